// mem_access_ctrl: memory access controller for a pipelined (modulo
// scheduled) loop whose body reads NRD words, computes for NC cycles and
// writes NWR results through a single memory port.
//
// How it works. At elaboration the mas_pkg functions build the standard
// memory access schedule of one iteration, delay its writes by D cycles,
// shift and add it M times (M = prologue number) and apply the memory timing
// rules. The result is a table of (2M+1)*II + DW cycles, II = NRD + NWR:
// the first M*II cycles are the prologue, the next II cycles one period of
// the steady state and the rest the epilogue. A small sequencer plays the
// prologue once, repeats the steady period n_iter - M times and plays the
// epilogue once, so a loop of n_iter iterations takes (n_iter + M)*II + DW
// cycles and the memory port carries NRD reads and NWR writes in every
// period. The same table also carries, for the data side, when a read word
// is present at the internal circuit (din_valid, din_first on the first
// word of an iteration) and the queue controls of the write standardizer,
// computed by the two-scan queue algorithm on the body extended by D cycles
// (ORIG_WR marks the cycles in which the circuit produces its results).
//
// Timing. start is accepted while idle with n_iter >= max(M, 1) and is
// ignored otherwise. Cycle 0 is the cycle after start is accepted. mem_strobe_n,
// mem_ws_drv/mem_ws_val (Write_Sel_n: driven 1 = read, driven 0 = write,
// released = high impedance) and mem_addr describe the access of the current
// cycle. A word read in cycle t reaches the circuit in cycle t + DR; a
// result written in cycle t is expected on the write data path in cycle
// t + DW. Read addresses run up from rd_base, write addresses from wr_base,
// one word per access. done pulses for one cycle right after the last
// cycle of the epilogue, when busy has fallen.
//
// The timing rules, the conflict check, the formulas for II, M and D, the
// shift-and-add construction, the queue scans and the prologue / steady
// state / epilogue split are the published scheme. The table-driven
// sequencer, the sequential address counters, the start/done handshake and
// the restriction that every per-iteration event fits in (M+1)*II cycles
// (which holds for DW = 0) are this design's choices.
module mem_access_ctrl
  import mas_pkg::*;
#(
  parameter int          NRD     = 6,
  parameter int          NC      = 3,
  parameter int          NWR     = 2,
  parameter int          DR      = 2,
  parameter int          DW      = 0,
  parameter logic [63:0] ORIG_WR = 64'h600,
  parameter int          ADDR_W  = 16,
  parameter int          NITER_W = 16
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               start,
  input  logic [NITER_W-1:0] n_iter,
  input  logic [ADDR_W-1:0]  rd_base,
  input  logic [ADDR_W-1:0]  wr_base,
  output phase_t             phase,
  output logic               busy,
  output logic               done,
  output logic               mem_strobe_n,
  output logic               mem_ws_drv,
  output logic               mem_ws_val,
  output logic [ADDR_W-1:0]  mem_addr,
  output logic               din_valid,
  output logic               din_first,
  output logic               qw_en,
  output logic               qr_en,
  output logic               qm_sel
);
  // ---------------------------------------------------------------- schedule
  localparam int II   = NRD + NWR;
  localparam int M    = prologue_m(NRD, NC, NWR, DR, DW);
  localparam int D    = write_delay(NRD, NC, NWR, DR, DW);
  localparam int N    = NRD + NC + NWR;
  localparam int NQ   = N + D;
  localparam int PLEN = pipelined_len(NRD, NC, NWR, DR, DW);
  localparam int W    = (2 * M + 1) * II + DW;
  localparam int PRO_END = M * II;        // first steady-state cycle
  localparam int EPI_BEG = (M + 1) * II;  // first epilogue cycle

  localparam data_vec_t   PDATA = pipelined_data(NRD, NC, NWR, DR, DW);
  localparam ctrl_sched_t CS    = ctrl_schedule(PDATA, PLEN, DR, DW, DR);

  localparam queue_ctrl_t QS = queue_scan(body_vec(NRD, NC, NWR, ORIG_WR), NQ);

  // Overlay iterations 0..M of a per-iteration table starting DR cycles in.
  function automatic tbl_t overlay(tbl_t body, int len);
    tbl_t t;
    t = '0;
    for (int j = 0; j <= M; j++)
      for (int n = 0; n < len; n++)
        if (body[n] && j * II + n + DR < MAXW) t[j*II+n+DR] = 1'b1;
    return t;
  endfunction

  function automatic tbl_t low_bits(int cnt);
    tbl_t t;
    t = '0;
    for (int n = 0; n < cnt && n < MAXW; n++) t[n] = 1'b1;
    return t;
  endfunction

  function automatic int popcount_n();
    int c;
    c = 0;
    for (int n = 0; n < 64; n++) if (ORIG_WR[n]) c += (n < N) ? 1 : 100;
    return c;
  endfunction

  localparam tbl_t T_DIN_VALID = overlay(low_bits(NRD), NRD);
  localparam tbl_t T_DIN_FIRST = overlay(low_bits(1), 1);
  localparam tbl_t T_QW        = overlay(QS.qw_en, NQ);
  localparam tbl_t T_QR        = overlay(QS.qr_en, NQ);
  localparam tbl_t T_QM        = overlay(QS.qm_sel, NQ);

  // The window is exact only if every event of an iteration lies within the
  // (M+1)*II cycles that follow its first strobe, and results of successive
  // iterations neither collide nor overtake each other in the queue.
  function automatic logic cfg_ok();
    int first_q, last_q;
    logic [63:0] fold;
    if (CS.conflict) return 1'b0;
    if (PLEN > MAXD || W > MAXW || NQ > MAXD) return 1'b0;
    if (popcount_n() != NWR) return 1'b0;
    if (DR < 0 || DW < 0 || DR + NQ > (M + 1) * II) return 1'b0;
    fold = '0;
    first_q = -1; last_q = -1;
    for (int n = 0; n < N; n++) begin
      if (ORIG_WR[n]) begin
        if (fold[n % II]) return 1'b0;
        fold[n % II] = 1'b1;
      end
      if (QS.qw_en[n]) begin
        if (first_q < 0) first_q = n;
        last_q = n;
      end
    end
    if (first_q >= 0 && last_q - first_q >= II) return 1'b0;
    return 1'b1;
  endfunction

  localparam logic CFG_OK = cfg_ok();
  if (!CFG_OK) begin : g_cfg_error
    $error("mem_access_ctrl: schedule has a conflict or does not fit");
  end

  // --------------------------------------------------------------- sequencer
  localparam int PCW = $clog2(W + 1);

  phase_t             st;
  logic [PCW-1:0]     pc;
  logic [NITER_W-1:0] reps_left;   // steady periods still to play after this one
  logic [ADDR_W-1:0]  rd_ptr, wr_ptr;
  logic               start_ok;
  logic               rd_acc, wr_acc;

  localparam logic [NITER_W-1:0] MIN_ITER = NITER_W'((M > 1) ? M : 1);
  assign start_ok = start && st == PH_IDLE && n_iter >= MIN_ITER;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      st        <= PH_IDLE;
      pc        <= '0;
      reps_left <= '0;
      done      <= 1'b0;
      rd_ptr    <= '0;
      wr_ptr    <= '0;
    end else begin
      done <= 1'b0;
      if (rd_acc) rd_ptr <= rd_ptr + 1'b1;
      if (wr_acc) wr_ptr <= wr_ptr + 1'b1;
      unique case (st)
        PH_IDLE: begin
          if (start_ok) begin
            rd_ptr <= rd_base;
            wr_ptr <= wr_base;
            if (M > 0) begin
              st        <= PH_PROLOGUE;
              pc        <= '0;
              reps_left <= n_iter - NITER_W'(M);
            end else begin
              st        <= PH_STEADY;
              pc        <= PCW'(PRO_END);
              reps_left <= n_iter - 1'b1;
            end
          end
        end
        PH_PROLOGUE: begin
          if (32'(pc) == PRO_END - 1) begin
            if (reps_left != '0) begin
              st        <= PH_STEADY;
              reps_left <= reps_left - 1'b1;
            end else begin
              st <= PH_EPILOGUE;
            end
            pc <= (reps_left != '0) ? PCW'(PRO_END) : PCW'(EPI_BEG);
          end else begin
            pc <= pc + 1'b1;
          end
        end
        PH_STEADY: begin
          if (32'(pc) == EPI_BEG - 1) begin
            if (reps_left != '0) begin
              reps_left <= reps_left - 1'b1;
              pc        <= PCW'(PRO_END);
            end else if (W > EPI_BEG) begin
              st <= PH_EPILOGUE;
              pc <= PCW'(EPI_BEG);
            end else begin
              st   <= PH_IDLE;
              done <= 1'b1;
            end
          end else begin
            pc <= pc + 1'b1;
          end
        end
        PH_EPILOGUE: begin
          if (32'(pc) == W - 1) begin
            st   <= PH_IDLE;
            done <= 1'b1;
          end else begin
            pc <= pc + 1'b1;
          end
        end
        default: st <= PH_IDLE;
      endcase
    end
  end

  // ----------------------------------------------------------------- outputs
  logic active;
  logic [$clog2(MAXW)-1:0] pci;  // table index
  assign pci = $bits(pci)'(pc);
  assign active = st != PH_IDLE;
  assign phase  = st;
  assign busy   = active;

  always_comb begin
    mem_strobe_n = 1'b1;
    mem_ws_drv   = 1'b0;
    mem_ws_val   = 1'b1;
    din_valid    = 1'b0;
    din_first    = 1'b0;
    qw_en        = 1'b0;
    qr_en        = 1'b0;
    qm_sel       = 1'b0;
    if (active) begin
      mem_strobe_n = CS.strobe_n[pci];
      mem_ws_drv   = CS.ws_drv[pci];
      mem_ws_val   = CS.ws_val[pci];
      din_valid    = T_DIN_VALID[pci];
      din_first    = T_DIN_FIRST[pci];
      qw_en        = T_QW[pci];
      qr_en        = T_QR[pci];
      qm_sel       = T_QM[pci];
    end
  end

  assign rd_acc   = !mem_strobe_n && mem_ws_drv && mem_ws_val;
  assign wr_acc   = !mem_strobe_n && mem_ws_drv && !mem_ws_val;
  assign mem_addr = wr_acc ? wr_ptr : rd_ptr;

  // A strobe always comes with a driven Write_Sel_n.
  a_strobe_ws: assert property (@(posedge clk) disable iff (!rst_n)
                                !mem_strobe_n |-> mem_ws_drv)
    else $error("mem_access_ctrl: strobe without Write_Sel_n");

endmodule
