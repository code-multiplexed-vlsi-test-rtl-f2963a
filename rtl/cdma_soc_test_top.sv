// cdma_soc_test_top: code multiplexed (CDMA) test access for an SOC.
//
// N_CORES embedded cores are tested at the same time over one shared test bus.
// Per core k there is a test generator (TG) and an encoder using Walsh code
// k+1; the main controller adds the spread chips of all encoders and
// broadcasts the binary chip sums over the bus (3 bits wide for five cores).
// At every core a decoder correlates the sums with that core's code and
// recovers the core's own bit stream, which a wrapper turns into patterns of
// the core's input width. The cores themselves are outside this module: their
// patterns leave on core_pattern/core_pattern_valid and their responses
// return on core_resp/core_resp_valid, where the main controller compacts and
// checks them.
//
// Use: with start low, pulse cfg_load with cfg[k] set (generator mode, seed,
// taps, pattern count, golden signature). Pulse start; busy rises, and done
// rises when all cores' responses are in. all_pass / core_pass give the
// verdict. Transmission takes CODE_LEN clocks per bit of the longest core
// test, reported in tx_cycles.
// The split into TGs, encoders, main controller, decoders and cores follows
// the published architecture; the core interface and configuration port are
// this design's own.
module cdma_soc_test_top
  import cdma_pkg::*;
#(
  parameter int unsigned N          = N_CORES,
  parameter int unsigned CODE_LEN_P = CODE_LEN,
  parameter int unsigned PI_W [N]   = CORE_PI,
  parameter int unsigned PO_W [N]   = CORE_PO,
  localparam int unsigned IDX_W = $clog2(CODE_LEN_P),
  localparam int unsigned SUM_W = $clog2(N + 1)
) (
  input  logic              clk,
  input  logic              rst_n,
  // configuration and control
  input  logic              cfg_load,
  input  core_cfg_t         cfg            [N],
  input  logic              start,
  output logic              busy,
  output logic              done,
  output logic [N-1:0]      core_done,
  output logic [N-1:0]      core_pass,
  output logic              all_pass,
  output logic [SIG_W-1:0]  signature      [N],
  output logic [31:0]       tx_cycles,
  output logic [31:0]       session_cycles,
  // shared bus, for observation
  output logic [SUM_W-1:0]  bus_sum,
  output logic              bus_valid,
  // embedded core interface
  output logic [MAX_PI-1:0] core_pattern   [N],
  output logic [N-1:0]      core_pattern_valid,
  input  logic [MAX_PO-1:0] core_resp      [N],
  input  logic [N-1:0]      core_resp_valid
);

  initial begin
    assert (N <= CODE_LEN_P - 1)
      else $error("cdma_soc_test_top: a %0d-chip Walsh set serves at most %0d cores",
                  CODE_LEN_P, CODE_LEN_P - 1);
  end

  logic [N-1:0]     tg_active, tg_bit, chips;
  logic             tg_start, sym_adv, chip_en;
  logic [IDX_W-1:0] chip_idx, bus_idx;

  main_controller #(.N(N), .CODE_LEN_P(CODE_LEN_P), .PO_W(PO_W)) u_ctrl (
    .clk            (clk),
    .rst_n          (rst_n),
    .cfg_load       (cfg_load),
    .cfg            (cfg),
    .start          (start),
    .tg_active      (tg_active),
    .chips          (chips),
    .tg_start       (tg_start),
    .sym_adv        (sym_adv),
    .chip_idx       (chip_idx),
    .chip_en        (chip_en),
    .bus_sum        (bus_sum),
    .bus_idx        (bus_idx),
    .bus_valid      (bus_valid),
    .resp           (core_resp),
    .resp_valid     (core_resp_valid),
    .busy           (busy),
    .done           (done),
    .core_done      (core_done),
    .core_pass      (core_pass),
    .all_pass       (all_pass),
    .signature      (signature),
    .tx_cycles      (tx_cycles),
    .session_cycles (session_cycles)
  );

  for (genvar k = 0; k < N; k++) begin : g_core
    logic dec_bit, dec_valid, dec_done;
    logic [PI_W[k]-1:0] pattern;

    test_generator #(.PAT_W(PI_W[k])) u_tg (
      .clk      (clk),
      .rst_n    (rst_n),
      .cfg_load (cfg_load && !busy),
      .cfg_mode (cfg[k].mode),
      .cfg_seed (cfg[k].seed[PI_W[k]-1:0]),
      .cfg_taps (cfg[k].taps[PI_W[k]-1:0]),
      .cfg_npat (cfg[k].npat),
      .start    (tg_start),
      .sym_adv  (sym_adv),
      .bit_out  (tg_bit[k]),
      .active   (tg_active[k]),
      .pat_idx  (),
      .bit_idx  ()
    );

    cdma_encoder #(.CODE_LEN(CODE_LEN_P), .CODE_IDX(k + 1)) u_enc (
      .clk        (clk),
      .rst_n      (rst_n),
      .data_bit   (tg_bit[k]),
      .data_valid (tg_active[k]),
      .chip_idx   (chip_idx),
      .chip_en    (chip_en),
      .chip       (chips[k])
    );

    cdma_decoder #(.N_IN(N), .CODE_LEN(CODE_LEN_P), .CODE_IDX(k + 1)) u_dec (
      .clk       (clk),
      .rst_n     (rst_n),
      .sum       (bus_sum),
      .sum_idx   (bus_idx),
      .sum_valid (bus_valid),
      .bit_out   (dec_bit),
      .bit_valid (dec_valid),
      .sym_done  (dec_done)
    );

    core_test_wrapper #(.PI_W(PI_W[k])) u_wrap (
      .clk           (clk),
      .rst_n         (rst_n),
      .bit_in        (dec_bit),
      .bit_valid     (dec_valid),
      .sym_done      (dec_done),
      .pattern       (pattern),
      .pattern_valid (core_pattern_valid[k])
    );

    assign core_pattern[k] = MAX_PI'(pattern);
  end

endmodule
