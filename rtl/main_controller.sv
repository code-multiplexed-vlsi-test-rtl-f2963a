// main_controller: sequences a concurrent test session over the CDMA bus.
//
// The controller runs the chip clock of the shared bus, adds the spread test
// data of all encoders into one bus word per chip (chip_adder), and analyzes
// the responses of all cores at the same time (one response_analyzer each).
//
// Configuration: cfg_load while not busy captures each core's pattern count
// and golden signature (the TGs capture their own fields at the same time).
// Session: start (while not busy) pulses tg_start to every TG and every
// response analyzer and enters RUN. In RUN chip_idx counts 0..CODE_LEN-1 with
// chip_en high; sym_adv pulses in the last chip slot of each symbol so that
// every active TG moves to its next bit. At a symbol boundary with no TG
// active any more, RUN ends and FLUSH waits until every analyzer has seen all
// its responses; the controller then enters DONE, raises done and reports
// per-core pass flags. Because all TGs transmit at once, the transmit time is
// CODE_LEN x (largest number of test bits of any one core), not the sum over
// the cores as when the cores take turns on one channel.
//
// Interface and timing: chips are the registered encoder outputs for the chip
// slot of the previous clock; bus_* follow one clock later. tx_cycles counts
// clocks with chip_en high; session_cycles counts clocks from start to done.
// Chip addition, broadcast to all cores and result analysis in the main
// controller follow the published architecture; the FSM, the end-of-session
// rule and the counters are this design's own.
module main_controller
  import cdma_pkg::*;
#(
  parameter int unsigned N          = N_CORES,
  parameter int unsigned CODE_LEN_P = CODE_LEN,
  parameter int unsigned PO_W [N]   = CORE_PO,
  localparam int unsigned IDX_W = $clog2(CODE_LEN_P),
  localparam int unsigned SUM_W = $clog2(N + 1)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              cfg_load,
  input  core_cfg_t         cfg        [N],
  input  logic              start,
  // test generator and encoder side
  input  logic [N-1:0]      tg_active,
  input  logic [N-1:0]      chips,
  output logic              tg_start,
  output logic              sym_adv,
  output logic [IDX_W-1:0]  chip_idx,
  output logic              chip_en,
  // shared CDMA bus
  output logic [SUM_W-1:0]  bus_sum,
  output logic [IDX_W-1:0]  bus_idx,
  output logic              bus_valid,
  // core responses
  input  logic [MAX_PO-1:0] resp       [N],
  input  logic [N-1:0]      resp_valid,
  // status
  output logic              busy,
  output logic              done,
  output logic [N-1:0]      core_done,
  output logic [N-1:0]      core_pass,
  output logic              all_pass,
  output logic [SIG_W-1:0]  signature  [N],
  output logic [31:0]       tx_cycles,
  output logic [31:0]       session_cycles
);

  typedef enum logic [1:0] {MC_IDLE, MC_RUN, MC_FLUSH, MC_DONE} mc_state_e;

  mc_state_e        state_q;
  logic [IDX_W-1:0] chip_q;
  logic             stop_now;
  logic             chip_en_q;

  // The session ends at a symbol boundary once no TG has data left.
  assign stop_now = (state_q == MC_RUN) && (chip_q == '0) && (tg_active == '0);
  assign chip_en  = (state_q == MC_RUN) && !stop_now;
  assign chip_idx = chip_q;
  assign sym_adv  = chip_en && (chip_q == IDX_W'(CODE_LEN_P - 1));
  assign tg_start = start && (state_q == MC_IDLE || state_q == MC_DONE);
  assign busy     = (state_q == MC_RUN) || (state_q == MC_FLUSH);
  assign done     = (state_q == MC_DONE);
  assign all_pass = done && (core_pass == '1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q        <= MC_IDLE;
      chip_q         <= '0;
      chip_en_q      <= 1'b0;
      tx_cycles      <= '0;
      session_cycles <= '0;
    end else begin
      chip_en_q <= chip_en;
      unique case (state_q)
        MC_IDLE, MC_DONE: begin
          if (tg_start) begin
            state_q        <= MC_RUN;
            chip_q         <= '0;
            tx_cycles      <= '0;
            session_cycles <= '0;
          end
        end
        MC_RUN: begin
          session_cycles <= session_cycles + 32'd1;
          if (stop_now) begin
            state_q <= MC_FLUSH;
          end else begin
            tx_cycles <= tx_cycles + 32'd1;
            chip_q    <= (chip_q == IDX_W'(CODE_LEN_P - 1)) ? '0 : chip_q + IDX_W'(1);
          end
        end
        MC_FLUSH: begin
          session_cycles <= session_cycles + 32'd1;
          if (core_done == '1) state_q <= MC_DONE;
        end
        default: state_q <= MC_IDLE;
      endcase
    end
  end

  // Pattern counts and golden signatures are captured with the generators'
  // configuration (cfg_load while not busy) and handed to the analyzers at start.
  logic [NPAT_W-1:0] npat_q   [N];
  logic [SIG_W-1:0]  golden_q [N];
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < N; k++) begin
        npat_q[k]   <= '0;
        golden_q[k] <= '0;
      end
    end else if (cfg_load && !busy) begin
      for (int k = 0; k < N; k++) begin
        npat_q[k]   <= cfg[k].npat;
        golden_q[k] <= cfg[k].golden;
      end
    end
  end

  // The encoders register their chips, so the chip index is delayed by one
  // clock to stay aligned with them on the bus.
  logic [IDX_W-1:0] chip_idx_d;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) chip_idx_d <= '0;
    else        chip_idx_d <= chip_q;
  end

  chip_adder #(.N_IN(N), .CODE_LEN(CODE_LEN_P)) u_adder (
    .clk        (clk),
    .rst_n      (rst_n),
    .chips      (chips),
    .chip_idx   (chip_idx_d),
    .chip_valid (chip_en_q),
    .sum        (bus_sum),
    .sum_idx    (bus_idx),
    .sum_valid  (bus_valid)
  );

  for (genvar k = 0; k < N; k++) begin : g_ra
    response_analyzer #(.RESP_W(PO_W[k])) u_ra (
      .clk        (clk),
      .rst_n      (rst_n),
      .start      (tg_start),
      .npat       (npat_q[k]),
      .golden     (golden_q[k]),
      .resp       (resp[k][PO_W[k]-1:0]),
      .resp_valid (resp_valid[k]),
      .done       (core_done[k]),
      .pass       (core_pass[k]),
      .signature  (signature[k]),
      .resp_count ()
    );
  end

  // TGs advance only in the last chip slot of a symbol.
  assert property (@(posedge clk) disable iff (!rst_n)
                   (state_q == MC_RUN) |-> !(sym_adv && chip_q != IDX_W'(CODE_LEN_P - 1)));

endmodule
