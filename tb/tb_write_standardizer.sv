// tb_write_standardizer: self-checking test of the queue-plus-multiplexer
// that moves results to the standard write slots.
//
// Part 1 replays the ten-cycle example of the scheme: results 3, 4, 8, 2, 5
// and 7 are produced in cycles 1, 2, 4, 5, 7 and 9 and must leave in cycles
// 4 to 9, in order, through a queue of two words. The enables are written
// out by hand from the two-scan algorithm (push in 1, 2, 4, 5, 7; pop in 4
// to 8; bypass in 9) and the package function is checked against them.
// Part 2 draws random bodies (random result cycles), takes the enables from
// the scan function and checks that the results leave in order in the last
// cycles of the body and that the queue never needs more than the minimum
// length the scan reports.
module tb_write_standardizer;
  import mas_pkg::*;
  localparam int W = 16;

  logic clk = 1'b0;
  logic rst_n;
  logic [W-1:0] result, data_out_a, data_out_b;
  logic qw_en, qr_en, qm_sel;

  int checks = 0, failures = 0;

  logic part1 = 1'b1;  // dut_a only sees the published example
  write_standardizer #(.W(W), .DEPTH(2)) dut_a (
    .clk, .rst_n, .result, .qw_en(qw_en && part1), .qr_en(qr_en && part1),
    .qm_sel, .data_out(data_out_a));
  // Part 2 uses a queue sized for the worst random body.
  write_standardizer #(.W(W), .DEPTH(8)) dut_b (
    .clk, .rst_n, .result, .qw_en, .qr_en, .qm_sel, .data_out(data_out_b));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    data_vec_t   d;
    queue_ctrl_t q;
    static int vals [10] = '{0, 3, 4, 0, 8, 2, 0, 5, 0, 7};
    static int outs [10] = '{0, 0, 0, 0, 3, 4, 8, 2, 5, 7};
    static logic [9:0] exp_qw = 10'b0010110110;
    static logic [9:0] exp_qr = 10'b0111110000;
    static logic [9:0] exp_qm = 10'b1000000000;

    rst_n = 1'b0; result = '0; qw_en = 0; qr_en = 0; qm_sel = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;

    // ---- Part 1: the published ten-cycle example
    d = '0;
    foreach (vals[n]) if (vals[n] != 0) d[n] = ACC_WR;
    q = queue_scan(d, 10);
    check("scan QW_En", q.qw_en[9:0] == exp_qw);
    check("scan QR_En", q.qr_en[9:0] == exp_qr);
    check("scan QM_Sel", q.qm_sel[9:0] == exp_qm);
    check("scan L_MIN = 2", q.lmin == 2);
    check("scan N_k = 1", q.nk == 1);
    for (int n = 0; n < 10; n++) begin
      result = W'(vals[n]);
      qw_en = exp_qw[n]; qr_en = exp_qr[n]; qm_sel = exp_qm[n];
      #1;
      if (exp_qr[n] || exp_qm[n]) check("example output", data_out_a == W'(outs[n]));
      @(posedge clk);
      #1;
    end
    qw_en = 0; qr_en = 0; qm_sel = 0;
    part1 = 1'b0;

    // ---- Part 2: random bodies
    for (int trial = 0; trial < 300; trial++) begin
      int len, nw, k, next_out, occ;
      logic [W-1:0] produced[$];
      produced.delete();
      len = $urandom_range(4, 24);
      d = '0;
      nw = 0;
      for (int n = 0; n < len; n++)
        if ($urandom_range(0, 2) == 0) begin d[n] = ACC_WR; nw++; end
      q = queue_scan(d, len);
      check("queue length within test queue", q.lmin <= 8);
      k = 0; next_out = 0; occ = 0;
      for (int n = 0; n < len; n++) begin
        result = W'($urandom);
        if (d[n] == ACC_WR) produced.push_back(result);
        qw_en = q.qw_en[n]; qr_en = q.qr_en[n]; qm_sel = q.qm_sel[n];
        // the write slots are the last nw cycles of the body
        check("slot position", (qr_en || qm_sel) == (n >= len - nw));
        #1;
        if (qr_en || qm_sel) begin
          check("random output order", data_out_b == produced[next_out]);
          next_out++;
        end
        occ = occ + int'(qw_en) - int'(qr_en);
        check("occupancy within L_MIN", occ <= int'(q.lmin));
        @(posedge clk);
        #1;
      end
      check("all results delivered", next_out == nw);
      check("queue drained", occ == 0);
      qw_en = 0; qr_en = 0; qm_sel = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
