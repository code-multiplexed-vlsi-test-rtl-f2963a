// tb_response_analyzer: feeds random response streams (with gaps) into the
// analyzer and compares the signature with a reference MISR. A session with
// the correct golden signature must pass, one with a single flipped response
// bit must fail, responses after done must be ignored, and npat = 0 must
// finish at once.
module tb_response_analyzer;
  import cdma_pkg::*;
  import tb_ref_pkg::*;

  localparam int unsigned RW = 11;

  logic clk = 0, rst_n = 0;
  logic start = 0, resp_valid = 0;
  logic [NPAT_W-1:0] npat = '0;
  logic [SIG_W-1:0] golden = '0;
  logic [RW-1:0] resp = '0;
  logic done, pass;
  logic [SIG_W-1:0] signature;
  logic [NPAT_W-1:0] resp_count;

  int checks = 0, failures = 0;
  int detected = 0;

  response_analyzer #(.RESP_W(RW)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // One session: n responses; if flip >= 0, that response gets one bit flipped
  // relative to the stream the golden signature was computed from.
  task automatic session(int n, int flip);
    logic [RW-1:0] stream [];
    logic [31:0] sig;
    stream = new[n];
    sig = '0;
    for (int i = 0; i < n; i++) begin
      stream[i] = RW'($urandom);
      sig = misr_ref(sig, 32'(stream[i]));
    end
    @(negedge clk);
    npat = NPAT_W'(n); golden = sig; start = 1;
    @(negedge clk);
    start = 0;
    check(done == (n == 0), "done after start");
    for (int i = 0; i < n; i++) begin
      if ($urandom_range(0, 2) == 0) repeat ($urandom_range(1, 4)) @(negedge clk);
      check(!done, "not done early");
      resp = stream[i];
      if (i == flip) resp[$urandom_range(0, RW - 1)] ^= 1'b1;
      resp_valid = 1;
      @(negedge clk);
      resp_valid = 0;
    end
    check(done, "done after last response");
    check(resp_count == NPAT_W'(n), "response count");
    if (flip < 0) check(pass && signature == sig, "pass with golden signature");
    else begin
      check(!pass, "single-bit error detected");
      if (!pass) detected++;
    end
    // Stray responses after done are ignored.
    resp = RW'($urandom); resp_valid = 1;
    @(negedge clk);
    resp_valid = 0;
    check(resp_count == NPAT_W'(n), "stray response ignored");
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    check(!done && !pass, "idle after reset");
    session(20, -1);
    session(20, 7);
    session(0, -1);
    for (int i = 0; i < 6; i++) session(200, -1);
    for (int i = 0; i < 30; i++) session($urandom_range(1, 60), ($urandom_range(0, 1) == 0) ? -1 : 0);
    check(detected > 0, "error detection exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
