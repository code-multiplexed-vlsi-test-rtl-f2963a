// tb_workload_two_faults: the benchmark-SOC experiment in RTL form.
//
// Five cores with the s344, s349, s820, s832 and s1494 interface widths are
// tested concurrently over the shared bus, each for two modelled faults plus
// the fault-free case: fault A holds response bit 0 at 1, fault B inverts the
// top response bit whenever the top input bit is 1. For every session the
// testbench predicts each core's signature with and without the fault and
// checks the verdicts, and checks that the transmit time equals 8 clocks per
// bit of the longest core test; it prints the clocks that the same tests
// would need if the cores took turns on one channel.
module tb_workload_two_faults;
  import cdma_pkg::*;
  import tb_ref_pkg::*;

  localparam int unsigned N = N_CORES, L = CODE_LEN;
  localparam int NPAT = 64;

  logic clk = 0, rst_n = 0, cfg_load = 0, start = 0;
  core_cfg_t cfg [N];
  logic busy, done, all_pass;
  logic [N-1:0] core_done, core_pass;
  logic [SIG_W-1:0] signature [N];
  logic [31:0] tx_cycles, session_cycles;
  logic [2:0] bus_sum;
  logic bus_valid;
  logic [MAX_PI-1:0] core_pattern [N];
  logic [N-1:0] core_pattern_valid;
  logic [MAX_PO-1:0] core_resp [N];
  logic [N-1:0] core_resp_valid;
  logic [1:0] fault_sel = 2'd0;

  int checks = 0, failures = 0;
  int detected [4];

  cdma_soc_test_top dut (.*);

  for (genvar k = 0; k < N; k++) begin : g_core
    logic [CORE_PO[k]-1:0] r;
    tb_core_model #(.PI_W(CORE_PI[k]), .PO_W(CORE_PO[k]), .CORE_ID(k), .LAT(2)) u_core (
      .clk(clk), .pattern(core_pattern[k][CORE_PI[k]-1:0]),
      .pattern_valid(core_pattern_valid[k]), .fault_sel(fault_sel),
      .resp(r), .resp_valid(core_resp_valid[k]));
    assign core_resp[k] = MAX_PO'(r);
  end

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 30) $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] core_resp_ref(int k, logic [31:0] p, int fsel);
    logic [31:0] x, r;
    x = p * 32'h9E37_79B1 + 32'(k);
    r = (x ^ (x >> 15)) & ((32'd1 << CORE_PO[k]) - 1);
    case (fsel)
      2: r = r | 32'd1;
      3: if (p[CORE_PI[k] - 1]) r = r ^ (32'd1 << (CORE_PO[k] - 1));
      default: ;
    endcase
    return r;
  endfunction

  logic [MAX_PI-1:0] seeds [N], taps [N];

  task automatic session(int fsel);
    logic [31:0] pat, good, bad, mask;
    logic [N-1:0] exp_pass;
    int maxbits, sumbits;
    maxbits = 0; sumbits = 0;
    for (int k = 0; k < N; k++) begin
      mask = (32'd1 << CORE_PI[k]) - 1;
      cfg[k].mode = TG_LFSR;
      cfg[k].seed = seeds[k];
      cfg[k].taps = taps[k];
      cfg[k].npat = NPAT_W'(NPAT);
      pat = 32'(seeds[k]) & mask;
      good = '0; bad = '0;
      for (int i = 0; i < NPAT; i++) begin
        good = misr_ref(good, core_resp_ref(k, pat, 0));
        bad  = misr_ref(bad,  core_resp_ref(k, pat, fsel));
        pat  = lfsr_ref(pat, 32'(taps[k]) & mask, CORE_PI[k]);
      end
      cfg[k].golden = good;
      exp_pass[k] = (bad == good);
      if (CORE_PI[k] * NPAT > maxbits) maxbits = CORE_PI[k] * NPAT;
      sumbits += CORE_PI[k] * NPAT;
    end
    fault_sel = 2'(fsel);
    @(negedge clk);
    cfg_load = 1;
    @(negedge clk);
    cfg_load = 0;
    start = 1;
    @(negedge clk);
    start = 0;
    wait (done);
    @(negedge clk);
    for (int k = 0; k < N; k++) begin
      check(core_pass[k] == exp_pass[k],
            $sformatf("fault %0d core %0d verdict %0b expected %0b", fsel, k, core_pass[k], exp_pass[k]));
      if (!core_pass[k]) detected[fsel]++;
    end
    check(tx_cycles == 32'(L * maxbits), "transmit time = 8 x longest core test");
    $display("fault case %0d: verdicts %b, concurrent %0d clocks, one core at a time %0d clocks",
             fsel, core_pass, tx_cycles, L * sumbits);
  endtask

  initial begin
    for (int k = 0; k < N; k++) begin
      cfg[k] = '0;
      seeds[k] = MAX_PI'($urandom) | MAX_PI'(1);
      taps[k]  = MAX_PI'($urandom) | MAX_PI'(1 << (CORE_PI[k] - 1));
    end
    detected = '{0, 0, 0, 0};
    repeat (3) @(negedge clk);
    rst_n = 1;
    session(0);
    session(2);
    session(3);
    check(detected[0] == 0, "fault-free SOC passes");
    check(detected[2] > 0, "fault A detected");
    check(detected[3] > 0, "fault B detected");
    $display("detected: fault A on %0d of %0d cores, fault B on %0d of %0d cores",
             detected[2], N, detected[3], N);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
