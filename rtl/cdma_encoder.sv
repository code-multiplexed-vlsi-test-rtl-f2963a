// cdma_encoder: direct-sequence spreading of one TG's serial test data.
//
// Each test data bit is spread into CODE_LEN data chips by XOR with the
// encoder's Walsh code (row CODE_IDX of the code library): during chip slot j
// the encoder outputs data_bit ^ code[j]. The main controller steps chip_idx
// through 0..CODE_LEN-1 once per data bit and adds the chips of all encoders.
// A TG that has no data (data_valid low) contributes a 0 chip; since the other
// codes are balanced this adds the same amount to both accumulators of every
// decoder and so cannot be mistaken for data.
//
// Interface and timing: one chip per clock. chip is registered: the chip for
// (data_bit, chip_idx, chip_en) sampled at one edge appears after that edge.
// The XOR spreading follows the published encoding scheme; the serial chip
// timing and the idle behaviour are this design's own choices.
module cdma_encoder #(
  parameter int unsigned CODE_LEN = 8,
  parameter int unsigned CODE_IDX = 1,
  localparam int unsigned IDX_W = $clog2(CODE_LEN)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             data_bit,
  input  logic             data_valid,
  input  logic [IDX_W-1:0] chip_idx,
  input  logic             chip_en,
  output logic             chip
);

  logic [CODE_LEN-1:0] code;

  walsh_code_rom #(.CODE_LEN(CODE_LEN)) u_code (
    .code_idx (IDX_W'(CODE_IDX)),
    .code     (code)
  );

  initial begin
    assert (CODE_IDX >= 1 && CODE_IDX < CODE_LEN)
      else $error("cdma_encoder: CODE_IDX must select a balanced code (1..CODE_LEN-1)");
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) chip <= 1'b0;
    else        chip <= chip_en & data_valid & (data_bit ^ code[chip_idx]);
  end

endmodule
