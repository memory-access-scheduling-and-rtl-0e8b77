// tb_mas_top_full: one complete loop on mas_top with every parameter at its
// default (6 reads, 3 compute cycles, 2 writes per iteration, dR = 2,
// dW = 0, results produced in the standard slots). It runs 200 iterations,
// checks the cycle count (n_iter + M) * II = (200 + 1) * 8, every result word
// in the behavioural memory (sum of the iteration's six operand words plus
// the result's index) and the memory protocol, and that the prologue, the
// steady state, the epilogue and the queue were all used.
module tb_mas_top_full;
  import mas_pkg::*;
  localparam int NRD = 6, NWR = 2, II = 8, M = 1, NITER = 200;

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic        start, busy, done, din_valid, din_first, qw_en, qr_en, qm_sel;
  logic [15:0] n_iter, rd_base, wr_base;
  phase_t      phase;
  logic [31:0] din, result;
  logic        result_valid;
  logic        mem_strobe_n, mem_write_sel_n, mem_write_sel_oe, mem_data_oe;
  logic [15:0] mem_addr;
  logic [31:0] mem_data_o, mem_data_i;
  int          protocol_errors, turnarounds, protocol_base;
  int          checks = 0, failures = 0;
  int          n_pro = 0, n_steady = 0, n_epi = 0, n_push = 0, n_pop = 0;

  mas_top dut (.*);

  ext_mem_model #(.DATA_W(32), .ADDR_W(16)) u_mem (
    .clk, .mem_strobe_n, .mem_write_sel_n, .mem_write_sel_oe, .mem_addr,
    .mem_data_o, .mem_data_oe, .mem_data_i, .protocol_errors, .turnarounds);

  loop_body_model #(.DATA_W(32), .NRD(6), .NBODY(11), .ORIG_WR(64'h600)) u_body (
    .clk, .rst_n, .din, .din_valid, .din_first, .result, .result_valid);

  always #5 clk = ~clk;

  function automatic logic [31:0] init_word(int a);
    return a * 32'h9E37_79B1 ^ 32'h0000_5A5A;
  endfunction

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  always @(posedge clk) if (rst_n) begin
    if (phase == PH_PROLOGUE) n_pro++;
    if (phase == PH_STEADY)   n_steady++;
    if (phase == PH_EPILOGUE) n_epi++;
    if (qw_en) n_push++;
    if (qr_en) n_pop++;
    if ((qw_en || qm_sel) != result_valid) begin
      failures++;
      $display("FAIL result timing at %0t", $time);
    end
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cycles;
    start = 1'b0; n_iter = '0; rd_base = 16'h0040; wr_base = 16'h0600;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    protocol_base = protocol_errors;
    @(posedge clk); #1;
    start = 1'b1; n_iter = 16'(NITER);
    @(posedge clk); #1;
    start = 1'b0;
    cycles = 0;
    while (!done && cycles < 4000) begin
      @(posedge clk); #1;
      cycles++;
    end
    check("cycle count (n_iter + M) * II", cycles == (NITER + M) * II);
    repeat (3) @(posedge clk);
    #1;
    for (int i = 0; i < NITER; i++) begin
      logic [31:0] s;
      s = '0;
      for (int k = 0; k < NRD; k++) s += init_word(int'(rd_base) + i * NRD + k);
      for (int k = 0; k < NWR; k++)
        check($sformatf("result %0d.%0d", i, k),
              u_mem.mem[int'(wr_base) + i * NWR + k] == s + 32'(k));
    end
    check("word after the results untouched",
          u_mem.mem[int'(wr_base) + NITER * NWR] == init_word(int'(wr_base) + NITER * NWR));
    check("memory protocol", protocol_errors == protocol_base);
    check("prologue used", n_pro == M * II);
    check("steady state used", n_steady == (NITER - M) * II);
    check("epilogue used", n_epi == M * II);
    check("queue used", n_push == NITER * NWR && n_pop == NITER * NWR);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
