// tb_ref_pkg: reference models shared by the testbenches.
//
// walsh_ref builds Walsh rows by the recursive Hadamard doubling
// H(2n) = [H(n) H(n); H(n) ~H(n)] instead of the parity rule used in the RTL,
// so the testbenches check the code library against an independent
// construction. misr_ref and the pattern-step functions model the response
// compactor and the test generator modes.
package tb_ref_pkg;

  // Row `row` of the len x len Walsh matrix in 0/1 form; bit j is chip j.
  function automatic logic [63:0] walsh_ref(int unsigned len, int unsigned row);
    logic [63:0] m [64];
    int unsigned n;
    m[0] = 64'd0;
    n = 1;
    while (n < len) begin
      for (int unsigned r = 0; r < n; r++) begin
        logic [63:0] top, bot;
        top = m[r];
        bot = m[r];
        for (int unsigned c = 0; c < n; c++) begin
          top[n + c] = m[r][c];
          bot[n + c] = ~m[r][c];
        end
        m[r]     = top;
        m[r + n] = bot;
      end
      n = n * 2;
    end
    return m[row];
  endfunction

  function automatic logic [31:0] misr_ref(logic [31:0] sig, logic [31:0] resp);
    logic [31:0] s;
    s = {sig[30:0], 1'b0};
    if (sig[31]) s = s ^ 32'h04C1_1DB7;
    return s ^ resp;
  endfunction

  function automatic logic [31:0] lfsr_ref(logic [31:0] p, logic [31:0] taps, int unsigned w);
    logic [31:0] mask, n;
    mask = (w >= 32) ? 32'hFFFF_FFFF : ((32'd1 << w) - 1);
    n = (p >> 1);
    if (p[0]) n = n ^ taps;
    return n & mask;
  endfunction

  function automatic logic [31:0] count_ref(logic [31:0] p, int unsigned w);
    logic [31:0] mask;
    mask = (w >= 32) ? 32'hFFFF_FFFF : ((32'd1 << w) - 1);
    return (p + 1) & mask;
  endfunction

endpackage
