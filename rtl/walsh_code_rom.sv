// walsh_code_rom: Walsh spreading code library.
//
// Returns one row of the CODE_LEN x CODE_LEN Walsh (Sylvester-Hadamard)
// matrix in 0/1 form: chip j of row i is the parity of (i AND j). Row 0 is all
// zeros and unbalanced; rows 1..CODE_LEN-1 each hold equal numbers of ones and
// zeros and any two of them agree in exactly half their chips, which is the
// orthogonal and balanced property the CDMA decoder relies on. A bus built on
// CODE_LEN-chip codes therefore serves at most CODE_LEN-1 cores.
//
// Interface: code_idx selects the row; code[j] is chip j, chip 0 sent first.
// Purely combinational. The choice of Walsh codes and the S-1 core limit follow
// the published architecture; the row ordering is this design's own.
module walsh_code_rom #(
  parameter int unsigned CODE_LEN = 8,
  localparam int unsigned IDX_W = (CODE_LEN > 1) ? $clog2(CODE_LEN) : 1
) (
  input  logic [IDX_W-1:0]    code_idx,
  output logic [CODE_LEN-1:0] code
);

  initial begin
    assert (CODE_LEN >= 4 && (CODE_LEN & (CODE_LEN - 1)) == 0)
      else $error("walsh_code_rom: CODE_LEN must be a power of two >= 4");
  end

  always_comb begin
    for (int unsigned j = 0; j < CODE_LEN; j++) begin
      code[j] = ^(code_idx & IDX_W'(j));
    end
  end

endmodule
