// tb_mem_access_ctrl: self-checking test of the pipelined-loop memory access
// controller and of the schedule functions it is built from.
//
// Part 1 checks the schedule functions against hand-worked cases: the
// timing-rule example (dR = 2, dW = 0, data = 1,2,1,2 gives Strobe_n =
// 0 1 0 0 1 0 over indices -2..3), a read and a write landing on one cycle
// (reported as a conflict), the prologue number and write delay of two loop
// shapes, the RSH example and the shifted-and-added data of the default loop.
// Part 2 runs three controller configurations cycle by cycle against a
// reference model of the modulo schedule (see mac_cfg_check): the default
// six-read / three-compute / two-write loop, the two-read loop of the
// standardization example with results in body cycles 3 and 6 (prologue of
// two iterations), and a loop with no extra write delay whose last result
// bypasses the queue.
module tb_mem_access_ctrl;
  import mas_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  int checks = 0, failures = 0;
  int ca, fa, cb, fb, cc, fc;
  logic da, db, dc;

  always #5 clk = ~clk;

  mac_cfg_check #(.NRD(6), .NC(3), .NWR(2), .DR(2), .ORIG_WR(64'h600), .EXP_M(1),
                  .EXP_QW(64'h600), .EXP_QR(64'h3000), .EXP_QM(64'h0))
    cfg_a (.clk, .rst_n, .checks(ca), .failures(fa), .finished(da));
  mac_cfg_check #(.NRD(2), .NC(3), .NWR(2), .DR(2), .ORIG_WR(64'h48), .EXP_M(2),
                  .EXP_QW(64'h48), .EXP_QR(64'h300), .EXP_QM(64'h0))
    cfg_b (.clk, .rst_n, .checks(cb), .failures(fb), .finished(db));
  mac_cfg_check #(.NRD(2), .NC(2), .NWR(2), .DR(2), .ORIG_WR(64'h28), .EXP_M(1),
                  .EXP_QW(64'h8), .EXP_QR(64'h10), .EXP_QM(64'h20))
    cfg_c (.clk, .rst_n, .checks(cc), .failures(fc), .finished(dc));

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks + ca + cb + cc,
             failures + fa + fb + fc);
    $finish;
  end

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    data_vec_t d, e;
    ctrl_sched_t s;
    static int pd [22] = '{1,1,1,1,1,1,0,0,1,1,1,1,3,3,0,0,0,0,0,0,2,2};

    // timing rules on the published example, indices -2..3 -> k = 0..5
    d = '0;
    d[0] = ACC_RD; d[1] = ACC_WR; d[2] = ACC_RD; d[3] = ACC_WR;
    s = ctrl_schedule(d, 4, 2, 0, 2);
    check("example: no conflict", !s.conflict);
    check("example: Strobe_n 0 1 0 0 1 0", s.strobe_n[5:0] == 6'b010010);
    check("example: Write_Sel_n driven at -2, 0, 1, 3", s.ws_drv[5:0] == 6'b101101);
    check("example: Write_Sel_n 1 at reads, 0 at writes",
          s.ws_val[0] && s.ws_val[2] && !s.ws_val[3] && !s.ws_val[5]);

    // a write at 0 and a read at 1 with dR = 1 collide at index 0
    d = '0;
    d[0] = ACC_WR; d[1] = ACC_RD;
    s = ctrl_schedule(d, 2, 1, 0, 1);
    check("conflict detected", s.conflict);
    d = '0;
    d[0] = ACC_RD; d[1] = ACC_RD;
    s = ctrl_schedule(d, 2, 1, 0, 1);
    check("two reads: no conflict", !s.conflict);

    // prologue number and write delay
    check("m (6,3,2), dR=2", prologue_m(6, 3, 2, 2, 0) == 1);
    check("D (6,3,2), dR=2", write_delay(6, 3, 2, 2, 0) == 3);
    check("m (2,3,2), dR=2", prologue_m(2, 3, 2, 2, 0) == 2);
    check("D (2,3,2), dR=2", write_delay(2, 3, 2, 2, 0) == 3);
    check("m (3,10,1), dR=3", prologue_m(3, 10, 1, 3, 0) == 4);
    check("D (3,10,1), dR=3", write_delay(3, 10, 1, 3, 0) == 3);

    // RSH(9, 1, (1,1,1,1,1,1,0,0,0,2,2)) = (1,1,1,1,1,1,0,0,0,0,2,2)
    d = standard_data(6, 3, 2);
    e = rsh(9, 1, d);
    for (int n = 0; n < 12; n++)
      check("RSH example", e[n] == ((n < 6) ? 2'd1 : (n < 10) ? 2'd0 : 2'd2));
    check("RSH example length", e[12] == 2'd0);

    // steps 1-5 for the default loop
    d = pipelined_data(6, 3, 2, 2, 0);
    check("pipelined length", pipelined_len(6, 3, 2, 2, 0) == 22);
    for (int n = 0; n < 24; n++)
      check("pipelined data", d[n] == ((n < 22) ? 2'(pd[n]) : 2'd0));

    // run the controllers
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    wait (da && db && dc);
    $display("TB_RESULT checks=%0d failures=%0d", checks + ca + cb + cc,
             failures + fa + fb + fc);
    $finish;
  end
endmodule
