// response_analyzer: compacts one core's test responses and checks them.
//
// The responses of a core arrive as RESP_W-bit words with resp_valid. The
// first npat of them after start are folded into a SIG_W-bit multiple-input
// signature register (MISR): sig <= shl(sig) ^ (msb ? POLY : 0) ^ resp.
// When the last expected response has been folded in, done rises and pass
// tells whether the signature equals the fault-free (golden) signature.
// Responses arriving before start or after done are ignored.
//
// Interface and timing: start (one clock) clears the signature and count and
// captures npat and golden; npat = 0 finishes at once. done is a level that
// holds until the next start; pass is valid while done is high.
// That the main controller compares and analyzes the test results follows
// the published architecture; compaction into a MISR and the comparison with
// a golden signature are this design's own choices.
module response_analyzer
  import cdma_pkg::*;
#(
  parameter int unsigned RESP_W = 19
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic [NPAT_W-1:0] npat,
  input  logic [SIG_W-1:0]  golden,
  input  logic [RESP_W-1:0] resp,
  input  logic              resp_valid,
  output logic              done,
  output logic              pass,
  output logic [SIG_W-1:0]  signature,
  output logic [NPAT_W-1:0] resp_count
);

  typedef enum logic [1:0] {RA_IDLE, RA_RUN, RA_DONE} ra_state_e;

  ra_state_e         state_q;
  logic [NPAT_W-1:0] npat_q;
  logic [SIG_W-1:0]  golden_q;
  logic [SIG_W-1:0]  sig_next;

  initial begin
    assert (RESP_W <= SIG_W) else $error("response_analyzer: RESP_W must not exceed SIG_W");
  end

  always_comb begin
    sig_next = {signature[SIG_W-2:0], 1'b0} ^ (signature[SIG_W-1] ? MISR_POLY : '0)
             ^ SIG_W'(resp);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q    <= RA_IDLE;
      npat_q     <= '0;
      golden_q   <= '0;
      signature  <= '0;
      resp_count <= '0;
    end else if (start) begin
      state_q    <= (npat == '0) ? RA_DONE : RA_RUN;
      npat_q     <= npat;
      golden_q   <= golden;
      signature  <= '0;
      resp_count <= '0;
    end else if (state_q == RA_RUN && resp_valid) begin
      signature  <= sig_next;
      resp_count <= resp_count + NPAT_W'(1);
      if (resp_count == npat_q - NPAT_W'(1)) state_q <= RA_DONE;
    end
  end

  assign done = (state_q == RA_DONE);
  assign pass = done && (signature == golden_q);

endmodule
