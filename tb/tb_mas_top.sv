// tb_mas_top: end-to-end test of the memory subsystem with a behavioural
// memory and a behavioural loop body, in three configurations (see
// top_harness for what each run checks):
//   A  the default loop: 6 reads, 3 compute cycles, 2 writes, dR = 2;
//      prologue of one iteration, every result delayed 3 cycles in the queue
//   B  the loop of the standardization example (R C C W R C W rearranged
//      to R R C . . W W): results in body cycles 3 and 6, prologue of two
//   C  2 reads, 2 compute, 2 writes with no extra write delay: the first
//      result goes through the queue, the last one bypasses it
//   D  as B, but the circuit hands over its results in body cycles 4 and 5,
//      so one iteration's push meets the previous iteration's pop
// Every mechanism (prologue, steady state, epilogue, queue push, pop, push
// and pop together, bypass, bus turnaround) must occur at least once.
module tb_mas_top;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  int checks = 0, failures = 0;

  int c[4], f[4];
  logic fin[4];
  int pro[4], stdy[4], epi[4], push[4], pop[4], pp[4], byp[4], turn[4];

  always #5 clk = ~clk;

  top_harness #(.NRD(6), .NC(3), .NWR(2), .DR(2), .ORIG_WR(64'h600), .EXP_M(1),
                .RUN0(1), .RUN1(7), .RUN2(20)) cfg_a (
    .clk, .rst_n, .checks(c[0]), .failures(f[0]), .finished(fin[0]),
    .n_pro(pro[0]), .n_steady(stdy[0]), .n_epi(epi[0]), .n_push(push[0]),
    .n_pop(pop[0]), .n_push_pop(pp[0]), .n_bypass(byp[0]), .n_turn(turn[0]));
  top_harness #(.NRD(2), .NC(3), .NWR(2), .DR(2), .ORIG_WR(64'h48), .EXP_M(2),
                .RUN0(2), .RUN1(3), .RUN2(25)) cfg_b (
    .clk, .rst_n, .checks(c[1]), .failures(f[1]), .finished(fin[1]),
    .n_pro(pro[1]), .n_steady(stdy[1]), .n_epi(epi[1]), .n_push(push[1]),
    .n_pop(pop[1]), .n_push_pop(pp[1]), .n_bypass(byp[1]), .n_turn(turn[1]));
  top_harness #(.NRD(2), .NC(2), .NWR(2), .DR(2), .ORIG_WR(64'h28), .EXP_M(1),
                .RUN0(1), .RUN1(4), .RUN2(30)) cfg_c (
    .clk, .rst_n, .checks(c[2]), .failures(f[2]), .finished(fin[2]),
    .n_pro(pro[2]), .n_steady(stdy[2]), .n_epi(epi[2]), .n_push(push[2]),
    .n_pop(pop[2]), .n_push_pop(pp[2]), .n_bypass(byp[2]), .n_turn(turn[2]));
  top_harness #(.NRD(2), .NC(3), .NWR(2), .DR(2), .ORIG_WR(64'h30), .EXP_M(2),
                .RUN0(2), .RUN1(5), .RUN2(16)) cfg_d (
    .clk, .rst_n, .checks(c[3]), .failures(f[3]), .finished(fin[3]),
    .n_pro(pro[3]), .n_steady(stdy[3]), .n_epi(epi[3]), .n_push(push[3]),
    .n_pop(pop[3]), .n_push_pop(pp[3]), .n_bypass(byp[3]), .n_turn(turn[3]));

  task automatic report();
    int tc, tf;
    tc = checks; tf = failures;
    for (int i = 0; i < 4; i++) begin
      tc += c[i];
      tf += f[i];
    end
    $display("TB_RESULT checks=%0d failures=%0d", tc, tf);
  endtask

  task automatic mech(string name, int count);
    checks++;
    $display("mechanism %-22s %0d", name, count);
    if (count == 0) begin
      failures++;
      $display("FAIL mechanism never happened: %s", name);
    end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    report();
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    wait (fin[0] && fin[1] && fin[2] && fin[3]);
    mech("prologue cycles",     pro[0] + pro[1] + pro[2] + pro[3]);
    mech("steady-state cycles", stdy[0] + stdy[1] + stdy[2] + stdy[3]);
    mech("epilogue cycles",     epi[0] + epi[1] + epi[2] + epi[3]);
    mech("queue pushes",        push[0] + push[1] + push[2] + push[3]);
    mech("queue pops",          pop[0] + pop[1] + pop[2] + pop[3]);
    mech("push and pop at once", pp[0] + pp[1] + pp[2] + pp[3]);
    mech("queue bypass",        byp[0] + byp[1] + byp[2] + byp[3]);
    mech("read-write turnaround", turn[0] + turn[1] + turn[2] + turn[3]);
    report();
    $finish;
  end
endmodule
