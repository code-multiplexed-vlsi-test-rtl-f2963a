// test_generator: run-time reconfigurable test pattern generator (TG).
//
// One TG serves one core. It produces npat patterns of PAT_W bits and hands
// them to its CDMA encoder one bit per symbol, least significant bit first.
// Two generation modes can be chosen while the TG is idle, which is how a
// different pattern generator is configured at run time for each core:
//   TG_LFSR  - Galois LFSR: next = (p >> 1) ^ (p[0] ? taps : 0), from seed;
//   TG_COUNT - binary counter: next = p + 1, from seed.
// The first pattern is the seed itself.
//
// Interface and timing: cfg_load (while idle) captures mode, seed, taps and
// pattern count. start (while idle) loads the seed and raises active in the
// next cycle, unless the pattern count is zero. While active, bit_out holds
// the current bit; each sym_adv pulse moves to the next bit. After the last bit
// of the last pattern, sym_adv drops active. pat_idx and bit_idx give the
// position of bit_out.
// Reconfigurable TGs feeding encoders bit by bit follow the published
// architecture; the two modes, the LFSR form and the bit order are this
// design's own choices.
module test_generator
  import cdma_pkg::*;
#(
  parameter int unsigned PAT_W = 18
) (
  input  logic              clk,
  input  logic              rst_n,
  // configuration
  input  logic              cfg_load,
  input  tg_mode_e          cfg_mode,
  input  logic [PAT_W-1:0]  cfg_seed,
  input  logic [PAT_W-1:0]  cfg_taps,
  input  logic [NPAT_W-1:0] cfg_npat,
  // session control
  input  logic              start,
  input  logic              sym_adv,
  // serial test data
  output logic              bit_out,
  output logic              active,
  output logic [NPAT_W-1:0] pat_idx,
  output logic [$clog2(PAT_W+1)-1:0] bit_idx
);

  localparam int unsigned BIT_W = $clog2(PAT_W + 1);

  tg_mode_e          mode_q;
  logic [PAT_W-1:0]  seed_q, taps_q;
  logic [NPAT_W-1:0] npat_q;
  logic [PAT_W-1:0]  pattern_q, shift_q, next_pattern;

  always_comb begin
    unique case (mode_q)
      TG_LFSR:  next_pattern = (pattern_q >> 1) ^ (pattern_q[0] ? taps_q : '0);
      TG_COUNT: next_pattern = pattern_q + PAT_W'(1);
      default:  next_pattern = pattern_q;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mode_q    <= TG_LFSR;
      seed_q    <= '0;
      taps_q    <= '0;
      npat_q    <= '0;
      pattern_q <= '0;
      shift_q   <= '0;
      active    <= 1'b0;
      pat_idx   <= '0;
      bit_idx   <= '0;
    end else if (!active) begin
      if (cfg_load) begin
        mode_q <= cfg_mode;
        seed_q <= cfg_seed;
        taps_q <= cfg_taps;
        npat_q <= cfg_npat;
      end else if (start) begin
        pattern_q <= seed_q;
        shift_q   <= seed_q;
        pat_idx   <= '0;
        bit_idx   <= '0;
        active    <= (npat_q != '0);
      end
    end else if (sym_adv) begin
      if (bit_idx == BIT_W'(PAT_W - 1)) begin
        bit_idx <= '0;
        if (pat_idx == npat_q - NPAT_W'(1)) begin
          active <= 1'b0;
        end else begin
          pat_idx   <= pat_idx + NPAT_W'(1);
          pattern_q <= next_pattern;
          shift_q   <= next_pattern;
        end
      end else begin
        bit_idx <= bit_idx + BIT_W'(1);
        shift_q <= shift_q >> 1;
      end
    end
  end

  assign bit_out = shift_q[0];

endmodule
