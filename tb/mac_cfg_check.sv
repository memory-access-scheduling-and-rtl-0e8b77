// mac_cfg_check: drives one mem_access_ctrl configuration through loops of
// several lengths and compares every cycle with a reference worked out from
// the modulo schedule directly: in period p = t / II, phase f = t % II, the
// memory reads word p*NRD + f when f < NRD and p < n_iter, and writes result
// (p - M)*NWR + (f - NRD) when f >= NRD and M <= p < n_iter + M. Operands
// reach the circuit DR cycles after their read. The queue enables of
// iteration i are the per-iteration patterns EXP_QW/QR/QM (data index 0 =
// first operand) placed at i*II + DR. The loop must take (n_iter + M)*II
// cycles; done follows the last one.
module mac_cfg_check #(
  parameter int          NRD     = 6,
  parameter int          NC      = 3,
  parameter int          NWR     = 2,
  parameter int          DR      = 2,
  parameter logic [63:0] ORIG_WR = 64'h600,
  parameter int          EXP_M   = 1,
  parameter logic [63:0] EXP_QW  = 64'h600,
  parameter logic [63:0] EXP_QR  = 64'h3000,
  parameter logic [63:0] EXP_QM  = 64'h0
) (
  input  logic clk,
  input  logic rst_n,
  output int   checks,
  output int   failures,
  output logic finished
);
  import mas_pkg::*;
  localparam int II = NRD + NWR;
  localparam logic [15:0] RB = 16'h0100, WB = 16'h0800;

  logic start;
  logic [15:0] n_iter;
  phase_t phase;
  logic busy, done, strobe_n, ws_drv, ws_val, din_valid, din_first;
  logic qw_en, qr_en, qm_sel;
  logic [15:0] addr;

  mem_access_ctrl #(.NRD(NRD), .NC(NC), .NWR(NWR), .DR(DR), .DW(0),
                    .ORIG_WR(ORIG_WR)) dut (
    .clk, .rst_n, .start, .n_iter, .rd_base(RB), .wr_base(WB),
    .phase, .busy, .done, .mem_strobe_n(strobe_n), .mem_ws_drv(ws_drv),
    .mem_ws_val(ws_val), .mem_addr(addr), .din_valid, .din_first,
    .qw_en, .qr_en, .qm_sel);

  task automatic check(string what, logic ok, int t);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL [NRD=%0d NC=%0d NWR=%0d] %s at loop cycle %0d", NRD, NC, NWR, what, t);
    end
  endtask

  function automatic logic is_read(int t, int n);
    return t >= 0 && (t % II) < NRD && (t / II) < n;
  endfunction

  function automatic logic pat_at(logic [63:0] pat, int t, int n);
    for (int i = 0; i < n; i++) begin
      int k = t - DR - i * II;
      if (k >= 0 && k < 64 && pat[k]) return 1'b1;
    end
    return 1'b0;
  endfunction

  initial begin
    static int lens [4] = '{EXP_M, EXP_M + 1, 5, 9};
    checks = 0; failures = 0; finished = 1'b0;
    start = 1'b0; n_iter = '0;
    @(posedge rst_n);
    foreach (lens[li]) begin
      int n, total, p, f;
      logic exp_rd, exp_wr;
      n = (lens[li] < 1) ? 1 : lens[li];
      total = (n + EXP_M) * II;
      @(posedge clk); #1;
      start = 1'b1; n_iter = 16'(n);
      @(posedge clk); #1;
      start = 1'b0;
      for (int t = 0; t <= total + 2; t++) begin
        p = t / II; f = t % II;
        exp_rd = t < total && f < NRD && p < n;
        exp_wr = t < total && f >= NRD && p >= EXP_M && p - EXP_M < n;
        check("strobe", strobe_n == !(exp_rd || exp_wr), t);
        if (exp_rd) check("read: Write_Sel_n = 1", ws_drv && ws_val, t);
        if (exp_wr) check("write: Write_Sel_n = 0", ws_drv && !ws_val, t);
        if (!exp_rd && !exp_wr) check("Write_Sel_n released", !ws_drv, t);
        if (exp_rd) check("read address", addr == RB + 16'(p * NRD + f), t);
        if (exp_wr) check("write address",
                          addr == WB + 16'((p - EXP_M) * NWR + f - NRD), t);
        check("operand valid", din_valid == is_read(t - DR, n), t);
        check("first operand", din_first == (is_read(t - DR, n) && ((t - DR) % II) == 0), t);
        check("QW_En", qw_en == pat_at(EXP_QW, t, n), t);
        check("QR_En", qr_en == pat_at(EXP_QR, t, n), t);
        check("QM_Sel", qm_sel == pat_at(EXP_QM, t, n), t);
        if (t < total)
          check("phase", phase == ((p < EXP_M) ? PH_PROLOGUE :
                                   (p < n) ? PH_STEADY : PH_EPILOGUE), t);
        check("busy", busy == (t < total), t);
        check("done after (n_iter + M) * II cycles", done == (t == total), t);
        @(posedge clk); #1;
      end
    end
    finished = 1'b1;
  end
endmodule
