// chip_adder: adds the data chips of all encoders onto the shared CDMA bus.
//
// In every chip slot the chips of the N_IN encoders are added arithmetically
// and the binary value of the sum (0..N_IN) is driven on the bus, together
// with the chip index and a valid flag. With N_IN = 5 the bus carries a 3-bit
// sum per chip instead of five separate tester channels.
//
// Interface and timing: one registered stage; sum, sum_idx and sum_valid
// follow chips, chip_idx and chip_valid by one clock.
// Adding chips by position and sending the binary sum follow the published
// encoding scheme; sending one sum per clock with its index is this design's
// own choice.
module chip_adder #(
  parameter int unsigned N_IN     = 5,
  parameter int unsigned CODE_LEN = 8,
  localparam int unsigned SUM_W = $clog2(N_IN + 1),
  localparam int unsigned IDX_W = $clog2(CODE_LEN)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [N_IN-1:0]  chips,
  input  logic [IDX_W-1:0] chip_idx,
  input  logic             chip_valid,
  output logic [SUM_W-1:0] sum,
  output logic [IDX_W-1:0] sum_idx,
  output logic             sum_valid
);

  logic [SUM_W-1:0] total;

  always_comb begin
    total = '0;
    for (int unsigned i = 0; i < N_IN; i++) total += SUM_W'(chips[i]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sum       <= '0;
      sum_idx   <= '0;
      sum_valid <= 1'b0;
    end else begin
      sum       <= chip_valid ? total : '0;
      sum_idx   <= chip_idx;
      sum_valid <= chip_valid;
    end
  end

endmodule
