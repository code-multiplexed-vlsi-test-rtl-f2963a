// cdma_decoder: recovers one core's test data from the shared CDMA bus.
//
// Each received chip sum is added to a positive accumulator when the core's
// code chip for that slot is 0 and to a negative accumulator when it is 1.
// A data bit 1 XOR-spread with the core's code yields ones exactly where the
// code is 0, so it adds CODE_LEN/2 to the positive side only; a 0 adds the
// same to the negative side. Every other balanced, orthogonal code adds equal
// amounts to both sides. After the last chip of a symbol the larger
// accumulator gives the bit: positive > negative decodes 1, otherwise 0.
// Equal accumulators mean the core's TG sent nothing in that symbol; the
// decoder then reports the symbol with bit_valid low.
//
// Interface and timing: sum/sum_idx/sum_valid come from the bus, one chip per
// clock, chip 0 first. sym_done pulses for one clock after the cycle that
// delivered chip CODE_LEN-1, with bit_out and bit_valid for that symbol.
// The two-accumulator scheme and the comparison rule follow the published
// decoding scheme; the idle detection is this design's own addition.
module cdma_decoder #(
  parameter int unsigned N_IN     = 5,
  parameter int unsigned CODE_LEN = 8,
  parameter int unsigned CODE_IDX = 1,
  localparam int unsigned SUM_W = $clog2(N_IN + 1),
  localparam int unsigned IDX_W = $clog2(CODE_LEN),
  localparam int unsigned ACC_W = $clog2(N_IN * CODE_LEN / 2 + 1)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [SUM_W-1:0] sum,
  input  logic [IDX_W-1:0] sum_idx,
  input  logic             sum_valid,
  output logic             bit_out,
  output logic             bit_valid,
  output logic             sym_done
);

  logic [CODE_LEN-1:0] code;
  logic [ACC_W-1:0]    pos_q, neg_q;   // running sums before this chip
  logic [ACC_W-1:0]    pos_n, neg_n;   // sums including this chip

  walsh_code_rom #(.CODE_LEN(CODE_LEN)) u_code (
    .code_idx (IDX_W'(CODE_IDX)),
    .code     (code)
  );

  initial begin
    assert (CODE_IDX >= 1 && CODE_IDX < CODE_LEN)
      else $error("cdma_decoder: CODE_IDX must select a balanced code (1..CODE_LEN-1)");
  end

  always_comb begin
    // A new symbol starts at chip 0: the accumulators restart from zero.
    pos_n = (sum_idx == '0) ? '0 : pos_q;
    neg_n = (sum_idx == '0) ? '0 : neg_q;
    if (code[sum_idx]) neg_n = neg_n + ACC_W'(sum);
    else               pos_n = pos_n + ACC_W'(sum);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pos_q     <= '0;
      neg_q     <= '0;
      bit_out   <= 1'b0;
      bit_valid <= 1'b0;
      sym_done  <= 1'b0;
    end else begin
      sym_done <= 1'b0;
      if (sum_valid) begin
        pos_q <= pos_n;
        neg_q <= neg_n;
        if (sum_idx == IDX_W'(CODE_LEN - 1)) begin
          sym_done  <= 1'b1;
          bit_out   <= (pos_n > neg_n);
          bit_valid <= (pos_n != neg_n);
        end
      end
    end
  end

endmodule
