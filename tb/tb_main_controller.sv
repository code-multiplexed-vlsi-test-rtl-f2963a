// tb_main_controller: the controller at its default size (5 cores, 8 chips)
// with the test generators replaced by a counting model and the encoder chips
// by random bits. Checks the chip sequence (index 0..7, sym_adv in slot 7),
// the bus (sum = number of ones among the previous clock's chips, two clocks
// after chip_en), the end of transmission at the first symbol boundary with
// no TG active, tx_cycles = 8 x the largest per-core bit count, done only
// after every core's responses, and per-core pass/fail.
module tb_main_controller;
  import cdma_pkg::*;
  import tb_ref_pkg::*;

  localparam int unsigned N = N_CORES, L = CODE_LEN;

  logic clk = 0, rst_n = 0, start = 0, cfg_load = 0;
  core_cfg_t cfg [N];
  logic [N-1:0] tg_active, chips = '0;
  logic tg_start, sym_adv, chip_en;
  logic [2:0] chip_idx, bus_sum, bus_idx;
  logic bus_valid;
  logic [MAX_PO-1:0] resp [N];
  logic [N-1:0] resp_valid = '0;
  logic busy, done, all_pass;
  logic [N-1:0] core_done, core_pass;
  logic [SIG_W-1:0] signature [N];
  logic [31:0] tx_cycles, session_cycles;

  int checks = 0, failures = 0;
  int remaining [N];          // TG model: bits left per core
  int fails_seen = 0;

  main_controller dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // TG model: loads bit counts on tg_start, counts down on sym_adv.
  always_ff @(posedge clk) begin
    for (int k = 0; k < N; k++) begin
      if (tg_start) remaining[k] <= CORE_PI[k] * int'(cfg[k].npat);
      else if (sym_adv && remaining[k] > 0) remaining[k] <= remaining[k] - 1;
    end
  end
  always_comb for (int k = 0; k < N; k++) tg_active[k] = (remaining[k] > 0);

  // Bus and chip sequence checker.
  logic        en_d1 = 0, en_d2 = 0;
  logic [2:0]  idx_d1 = 0, idx_d2 = 0, exp_idx = 0;
  logic [N-1:0] chips_d1 = '0;
  int sym_advs = 0;
  always @(posedge clk) if (rst_n) begin
    check(bus_valid == en_d2, "bus_valid timing");
    if (en_d2) begin
      check(bus_idx == idx_d2, "bus index");
      check(int'(bus_sum) == $countones(chips_d1), "bus sum");
    end
    if (chip_en) begin
      check(chip_idx == exp_idx, "chip index sequence");
      check(sym_adv == (chip_idx == 3'(L - 1)), "sym_adv in last slot");
      exp_idx <= exp_idx + 3'd1;
      if (sym_adv) sym_advs++;
    end else begin
      check(!sym_adv, "no sym_adv without chip_en");
      exp_idx <= '0;
    end
    en_d2 <= en_d1; en_d1 <= chip_en;
    idx_d2 <= idx_d1; idx_d1 <= chip_idx;
    chips_d1 <= chips;
  end
  always @(negedge clk) chips <= N'($urandom);

  task automatic session(int npat_max, int bad_core);
    logic [31:0] sig [N];
    logic [MAX_PO-1:0] stream [N][$];
    int maxbits, cyc;
    int delay [N];
    maxbits = 0;
    for (int k = 0; k < N; k++) begin
      cfg[k] = '0;
      cfg[k].npat = NPAT_W'($urandom_range(0, npat_max));
      if (CORE_PI[k] * int'(cfg[k].npat) > maxbits) maxbits = CORE_PI[k] * int'(cfg[k].npat);
      sig[k] = '0;
      stream[k].delete();
      for (int i = 0; i < int'(cfg[k].npat); i++) begin
        logic [MAX_PO-1:0] r;
        r = MAX_PO'($urandom) & MAX_PO'((1 << CORE_PO[k]) - 1);
        stream[k].push_back(r);
        sig[k] = misr_ref(sig[k], 32'(r));
      end
      cfg[k].golden = sig[k] ^ ((k == bad_core) ? 32'h1 : 32'h0);
    end
    // Each core starts answering after its own random delay, often after
    // transmission has ended, so the controller must wait for all of them.
    for (int k = 0; k < N; k++) delay[k] = $urandom_range(0, L * maxbits + 300);
    sym_advs = 0;
    @(negedge clk);
    cfg_load = 1;
    @(negedge clk);
    cfg_load = 0;
    start = 1;
    @(negedge clk);
    start = 0;
    cyc = 1;
    // Deliver responses at random times while transmission runs and after.
    while (!done) begin
      check(busy, "busy during session");
      for (int k = 0; k < N; k++) begin
        resp_valid[k] = 0;
        if (stream[k].size() > 0 && cyc > delay[k] && $urandom_range(0, 3) == 0) begin
          resp[k] = stream[k].pop_front();
          resp_valid[k] = 1;
        end
      end
      @(negedge clk);
      cyc++;
      if (cyc > 100000) break;
    end
    resp_valid = '0;
    for (int k = 0; k < N; k++) check(stream[k].size() == 0, "done before all responses");
    check(tx_cycles == 32'(L * maxbits), $sformatf("tx_cycles %0d exp %0d", tx_cycles, L * maxbits));
    check(sym_advs == maxbits, $sformatf("sym_adv count %0d exp %0d", sym_advs, maxbits));
    check(session_cycles == 32'(cyc - 1), $sformatf("session_cycles %0d exp %0d", session_cycles, cyc - 1));
    for (int k = 0; k < N; k++) begin
      check(core_done[k], "core done");
      check(core_pass[k] == (k != bad_core || cfg[k].npat == 0 && sig[k] == cfg[k].golden),
            $sformatf("core %0d pass flag", k));
      check(signature[k] == sig[k], "signature");
    end
    check(all_pass == (bad_core < 0), "all_pass");
    if (bad_core >= 0 && !core_pass[bad_core]) fails_seen++;
  endtask

  initial begin
    for (int k = 0; k < N; k++) begin cfg[k] = '0; resp[k] = '0; remaining[k] = 0; end
    repeat (2) @(negedge clk);
    rst_n = 1;
    check(!busy && !done, "idle after reset");
    session(4, -1);
    session(6, 2);
    session(0, -1);
    for (int i = 0; i < 6; i++) session(5, $urandom_range(0, 1) ? -1 : int'($urandom_range(0, N - 1)));
    check(fails_seen > 0, "failing core exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
