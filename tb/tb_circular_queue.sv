// tb_circular_queue: self-checking test of the circular queue.
//
// A reference FIFO (a SystemVerilog queue) follows every push and pop. The
// test drives random push/pop patterns that never overflow or underflow,
// including long runs with the queue full where a push and a pop happen in
// the same cycle, and compares the head word and the fill count with the
// reference after every clock edge.
module tb_circular_queue;
  localparam int W = 16;
  localparam int DEPTH = 3;

  logic clk = 1'b0;
  logic rst_n;
  logic qw_en, qr_en;
  logic [W-1:0] wr_data, rd_data;
  logic [$clog2(DEPTH+1)-1:0] count;

  int checks = 0, failures = 0;
  int full_rw = 0;
  logic [W-1:0] ref_q[$];

  circular_queue #(.W(W), .DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
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
    rst_n = 1'b0; qw_en = 1'b0; qr_en = 1'b0; wr_data = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    check("empty after reset", count == 0);
    for (int i = 0; i < 2000; i++) begin
      logic can_r, can_w;
      can_r = ref_q.size() > 0;
      can_w = ref_q.size() < DEPTH;
      qr_en = can_r && ($urandom_range(0, 1) == 1);
      qw_en = ($urandom_range(0, 1) == 1) && (can_w || qr_en);
      if (i > 1000 && i < 1100 && ref_q.size() == DEPTH) begin
        qr_en = 1'b1; qw_en = 1'b1;          // full, push and pop together
      end
      wr_data = W'($urandom);
      if (qr_en) check("head word", rd_data == ref_q[0]);
      if (qw_en && qr_en && ref_q.size() == DEPTH) full_rw++;
      @(posedge clk);
      #1;
      if (qr_en) void'(ref_q.pop_front());
      if (qw_en) ref_q.push_back(wr_data);
      check("count", 32'(count) == ref_q.size());
    end
    check("push and pop while full occurred", full_rw > 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
