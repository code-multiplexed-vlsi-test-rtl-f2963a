// tb_core_model: behavioural stand-in for an embedded core under test.
//
// Replaces a benchmark circuit with a fixed hash of its input pattern:
// x = pattern * 0x9E3779B1 + CORE_ID, response = (x ^ (x >> 15)) cut to PO_W
// bits, delivered LAT clocks after the pattern. fault_sel models a defective
// core: 1 inverts response bit 0 always; 2 holds response bit 0 stuck at 1;
// 3 inverts the top response bit whenever the top input bit is 1.
module tb_core_model #(
  parameter int unsigned PI_W    = 9,
  parameter int unsigned PO_W    = 11,
  parameter int unsigned CORE_ID = 0,
  parameter int unsigned LAT     = 2
) (
  input  logic            clk,
  input  logic [PI_W-1:0] pattern,
  input  logic            pattern_valid,
  input  logic [1:0]      fault_sel,
  output logic [PO_W-1:0] resp,
  output logic            resp_valid
);
  logic [PO_W-1:0] pipe_d [LAT];
  logic            pipe_v [LAT];

  function automatic logic [PO_W-1:0] f(logic [PI_W-1:0] p);
    logic [31:0] x;
    x = 32'(p) * 32'h9E37_79B1 + 32'(CORE_ID);
    return PO_W'(x ^ (x >> 15));
  endfunction

  function automatic logic [PO_W-1:0] faulty(logic [PO_W-1:0] r, logic [PI_W-1:0] p);
    unique case (fault_sel)
      2'd1:    return r ^ PO_W'(1);
      2'd2:    return r | PO_W'(1);
      2'd3:    return p[PI_W-1] ? (r ^ (PO_W'(1) << (PO_W - 1))) : r;
      default: return r;
    endcase
  endfunction

  initial for (int i = 0; i < LAT; i++) begin pipe_d[i] = '0; pipe_v[i] = 0; end

  always_ff @(posedge clk) begin
    pipe_d[0] <= faulty(f(pattern), pattern);
    pipe_v[0] <= pattern_valid;
    for (int i = 1; i < LAT; i++) begin
      pipe_d[i] <= pipe_d[i-1];
      pipe_v[i] <= pipe_v[i-1];
    end
  end

  assign resp       = pipe_d[LAT-1];
  assign resp_valid = pipe_v[LAT-1];
endmodule
