// tb_cdma_soc_test_top: end-to-end test of the whole architecture at its
// default size (5 cores with the s344, s349, s820, s832, s1494 input/output
// widths, 8-chip Walsh codes, 3-bit shared bus).
//
// Behavioural core models answer every pattern. The testbench predicts each
// core's pattern sequence from its generator setup, checks that every core
// receives exactly those patterns over the shared bus while all five transmit
// at once, and computes each core's golden signature from the predicted
// patterns. Sessions cover: LFSR and counter generators, reconfiguration
// between sessions, cores finishing early (idle symbols on the bus while
// others continue), a core with no patterns, a defective core that must be
// flagged, and the transmit time, which must be 8 clocks per bit of the
// longest core test rather than the sum over the cores.
module tb_cdma_soc_test_top;
  import cdma_pkg::*;
  import tb_ref_pkg::*;

  localparam int unsigned N = N_CORES, L = CODE_LEN;

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
  logic [N-1:0] inject_fault = '0;

  int checks = 0, failures = 0;
  // Mechanism counters.
  int n_lfsr = 0, n_count = 0, n_reconfig = 0, n_idle_sym = 0, n_zero_core = 0;
  int n_fault_flagged = 0, n_concurrent = 0, n_full_bus = 0;

  cdma_soc_test_top dut (.*);

  for (genvar k = 0; k < N; k++) begin : g_core
    logic [CORE_PO[k]-1:0] r;
    tb_core_model #(.PI_W(CORE_PI[k]), .PO_W(CORE_PO[k]), .CORE_ID(k), .LAT(k % 3 + 1)) u_core (
      .clk(clk), .pattern(core_pattern[k][CORE_PI[k]-1:0]),
      .pattern_valid(core_pattern_valid[k]), .fault_sel({1'b0, inject_fault[k]}),
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
    repeat (3000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Received patterns per core.
  logic [MAX_PI-1:0] rx [N][$];
  always @(posedge clk)
    for (int k = 0; k < N; k++) if (core_pattern_valid[k]) rx[k].push_back(core_pattern[k]);
  always @(posedge clk) if (bus_valid && bus_sum == 3'(N)) n_full_bus++;

  function automatic logic [31:0] core_f(int k, logic [31:0] p);
    logic [31:0] x;
    x = p * 32'h9E37_79B1 + 32'(k);
    return (x ^ (x >> 15)) & ((32'd1 << CORE_PO[k]) - 1);
  endfunction

  task automatic session(tg_mode_e modes [N], int npats [N], logic [N-1:0] faulty);
    logic [31:0] pat, sig;
    logic [31:0] exp_pat [N][$];
    int maxbits, sumbits;
    maxbits = 0; sumbits = 0;
    for (int k = 0; k < N; k++) begin
      logic [31:0] mask;
      mask = (32'd1 << CORE_PI[k]) - 1;
      cfg[k].mode = modes[k];
      cfg[k].seed = MAX_PI'($urandom) | MAX_PI'(1);
      cfg[k].taps = MAX_PI'($urandom) | MAX_PI'(1 << (CORE_PI[k] - 1));
      cfg[k].npat = NPAT_W'(npats[k]);
      pat = 32'(cfg[k].seed) & mask;
      sig = '0;
      exp_pat[k].delete();
      for (int i = 0; i < npats[k]; i++) begin
        exp_pat[k].push_back(pat);
        sig = misr_ref(sig, core_f(k, pat));
        pat = (modes[k] == TG_LFSR) ? lfsr_ref(pat, 32'(cfg[k].taps) & mask, CORE_PI[k])
                                    : count_ref(pat, CORE_PI[k]);
      end
      cfg[k].golden = sig;
      if (CORE_PI[k] * npats[k] > maxbits) maxbits = CORE_PI[k] * npats[k];
      sumbits += CORE_PI[k] * npats[k];
      if (npats[k] > 0) begin
        if (modes[k] == TG_LFSR) n_lfsr++; else n_count++;
      end else n_zero_core++;
      rx[k].delete();
    end
    inject_fault = faulty;
    @(negedge clk);
    cfg_load = 1;
    @(negedge clk);
    cfg_load = 0;
    n_reconfig++;
    // The loaded configuration must be held internally: scramble the port.
    for (int k = 0; k < N; k++) cfg[k] = core_cfg_t'({$urandom, $urandom, $urandom});
    start = 1;
    @(negedge clk);
    start = 0;
    check(busy, "busy after start");
    fork
      wait (done);
      repeat (L * maxbits + 200) @(posedge clk);
    join_any
    disable fork;
    @(negedge clk);
    check(done, "session finished");
    check(tx_cycles == 32'(L * maxbits),
          $sformatf("tx_cycles %0d, expected 8 x %0d bits", tx_cycles, maxbits));
    if (sumbits > maxbits) n_concurrent++;
    // Symbols in which a core had finished while others still transmitted;
    // the exact pattern counts checked below show they were ignored.
    for (int k = 0; k < N; k++) n_idle_sym += maxbits - CORE_PI[k] * npats[k];
    for (int k = 0; k < N; k++) begin
      check(rx[k].size() == exp_pat[k].size(),
            $sformatf("core %0d received %0d patterns, expected %0d", k, rx[k].size(), exp_pat[k].size()));
      for (int i = 0; i < exp_pat[k].size() && i < rx[k].size(); i++)
        check(32'(rx[k][i]) == exp_pat[k][i], $sformatf("core %0d pattern %0d", k, i));
      check(core_done[k], "core done");
      check(core_pass[k] == !(faulty[k] && npats[k] > 0), $sformatf("core %0d verdict", k));
      if (faulty[k] && npats[k] > 0 && !core_pass[k]) n_fault_flagged++;
    end
    check(all_pass == (core_pass == '1), "all_pass");
    $display("session: longest core %0d bits, all cores %0d bits, %0d transmit clocks, %0d session clocks",
             maxbits, sumbits, tx_cycles, session_cycles);
  endtask

  initial begin
    tg_mode_e m [N];
    int np [N];
    for (int k = 0; k < N; k++) cfg[k] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // 1: all LFSR, equal pattern counts (s820/s832 have the longest tests).
    m = '{TG_LFSR, TG_LFSR, TG_LFSR, TG_LFSR, TG_LFSR};
    np = '{32, 32, 32, 32, 32};
    session(m, np, '0);
    // 2: reconfigured: mixed generator modes, unequal counts, one defective core.
    m = '{TG_COUNT, TG_LFSR, TG_COUNT, TG_LFSR, TG_COUNT};
    np = '{50, 10, 5, 20, 64};
    session(m, np, 5'b01000);
    // 3: one core without patterns, two defective cores.
    m = '{TG_LFSR, TG_COUNT, TG_LFSR, TG_COUNT, TG_LFSR};
    np = '{7, 0, 12, 3, 25};
    session(m, np, 5'b10001);
    // 4: a longer run, all counters.
    m = '{TG_COUNT, TG_COUNT, TG_COUNT, TG_COUNT, TG_COUNT};
    np = '{200, 150, 100, 120, 256};
    session(m, np, '0);
    check(n_lfsr > 0, "LFSR generator used");
    check(n_count > 0, "counter generator used");
    check(n_reconfig > 1, "reconfiguration between sessions");
    check(n_idle_sym > 0, "idle symbols (cores finishing early)");
    check(n_zero_core > 0, "core without patterns");
    check(n_fault_flagged > 0, "defective core flagged");
    check(n_concurrent > 0, "concurrent transmission shorter than serial");
    check(n_full_bus > 0, "all five chips high in one slot");
    $display("mechanisms: lfsr=%0d count=%0d reconfig=%0d idle_symbols=%0d zero_core=%0d fault_flagged=%0d concurrent=%0d full_bus=%0d",
             n_lfsr, n_count, n_reconfig, n_idle_sym, n_zero_core, n_fault_flagged, n_concurrent, n_full_bus);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
