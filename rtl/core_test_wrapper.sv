// core_test_wrapper: collects a core's decoded serial test data into patterns.
//
// Sits next to each embedded core, behind its CDMA decoder. Every valid
// decoded bit is shifted in; the first bit of a pattern ends up in bit 0.
// After PI_W valid bits the full pattern is presented on pattern with a
// one-clock pattern_valid pulse, to be applied to the core's primary inputs.
// Symbols that the decoder marks as carrying no data are ignored.
//
// Interface and timing: bit_in/bit_valid are sampled when sym_done is high;
// pattern and pattern_valid are registered and appear one clock after the
// sym_done that delivered the last bit.
// The published architecture says only that each core receives its own test
// data by decoding; this serial-to-parallel stage is this design's own.
module core_test_wrapper #(
  parameter int unsigned PI_W = 18
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            bit_in,
  input  logic            bit_valid,
  input  logic            sym_done,
  output logic [PI_W-1:0] pattern,
  output logic            pattern_valid
);

  localparam int unsigned CNT_W = $clog2(PI_W + 1);

  logic [PI_W-1:0]  shift_q, shift_n;
  logic [CNT_W-1:0] count_q;

  if (PI_W > 1) begin : g_wide
    assign shift_n = {bit_in, shift_q[PI_W-1:1]};
  end else begin : g_narrow
    assign shift_n = bit_in;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      shift_q       <= '0;
      count_q       <= '0;
      pattern       <= '0;
      pattern_valid <= 1'b0;
    end else begin
      pattern_valid <= 1'b0;
      if (sym_done && bit_valid) begin
        shift_q <= shift_n;
        if (count_q == CNT_W'(PI_W - 1)) begin
          count_q       <= '0;
          pattern       <= shift_n;
          pattern_valid <= 1'b1;
        end else begin
          count_q <= count_q + CNT_W'(1);
        end
      end
    end
  end

endmodule
