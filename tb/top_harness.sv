// top_harness: runs one configuration of mas_top end to end. The top is
// connected to the external memory model on its pins and to the loop body
// model on its internal-circuit ports. For each loop length in the run list
// it starts the loop, measures the cycles until done (expected
// (n_iter + M) * II), then checks every result word in memory against the
// sum of the operand words worked out from the memory's initial contents,
// and that the word after the last result was left alone. It also counts
// how often each mechanism happened: prologue, steady-state and epilogue
// cycles, queue pushes, pops, pushes and pops in one cycle, results that
// bypass the queue and read-to-write turnarounds on the memory bus.
module top_harness #(
  parameter int          NRD     = 6,
  parameter int          NC      = 3,
  parameter int          NWR     = 2,
  parameter int          DR      = 2,
  parameter logic [63:0] ORIG_WR = 64'h600,
  parameter int          EXP_M   = 1,
  parameter int          RUN0    = 1,
  parameter int          RUN1    = 7,
  parameter int          RUN2    = 20
) (
  input  logic clk,
  input  logic rst_n,
  output int   checks,
  output int   failures,
  output logic finished,
  output int   n_pro,
  output int   n_steady,
  output int   n_epi,
  output int   n_push,
  output int   n_pop,
  output int   n_push_pop,
  output int   n_bypass,
  output int   n_turn
);
  import mas_pkg::*;
  localparam int II = NRD + NWR;
  localparam int N  = NRD + NC + NWR;

  logic        start, busy, done, din_valid, din_first, qw_en, qr_en, qm_sel;
  logic [15:0] n_iter, rd_base, wr_base;
  phase_t      phase;
  logic [31:0] din, result;
  logic        result_valid;
  logic        mem_strobe_n, mem_write_sel_n, mem_write_sel_oe, mem_data_oe;
  logic [15:0] mem_addr;
  logic [31:0] mem_data_o, mem_data_i;
  int          protocol_errors, turnarounds;

  mas_top #(.NRD(NRD), .NC(NC), .NWR(NWR), .DR(DR), .DW(0), .ORIG_WR(ORIG_WR))
    dut (.*);

  ext_mem_model #(.DATA_W(32), .ADDR_W(16)) u_mem (
    .clk, .mem_strobe_n, .mem_write_sel_n, .mem_write_sel_oe, .mem_addr,
    .mem_data_o, .mem_data_oe, .mem_data_i, .protocol_errors, .turnarounds);

  loop_body_model #(.DATA_W(32), .NRD(NRD), .NBODY(N), .ORIG_WR(ORIG_WR)) u_body (
    .clk, .rst_n, .din, .din_valid, .din_first, .result, .result_valid);

  function automatic logic [31:0] init_word(int a);
    return a * 32'h9E37_79B1 ^ 32'h0000_5A5A;
  endfunction

  task automatic check(string what, logic ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL [NRD=%0d NC=%0d NWR=%0d] %s", NRD, NC, NWR, what);
    end
  endtask

  always @(posedge clk) if (rst_n) begin
    if (phase == PH_PROLOGUE) n_pro++;
    if (phase == PH_STEADY)   n_steady++;
    if (phase == PH_EPILOGUE) n_epi++;
    if (qw_en) n_push++;
    if (qr_en) n_pop++;
    if (qw_en && qr_en) n_push_pop++;
    if (qm_sel) n_bypass++;
    // the circuit must hand over a result exactly when the queue or the
    // bypass takes one
    if ((qw_en || qm_sel) != result_valid) begin
      failures++;
      $display("FAIL [NRD=%0d] result timing at %0t", NRD, $time);
    end
  end

  int protocol_base;

  initial begin
    static int runs [3] = '{RUN0, RUN1, RUN2};
    checks = 0; failures = 0; finished = 1'b0;
    n_pro = 0; n_steady = 0; n_epi = 0; n_push = 0; n_pop = 0;
    n_push_pop = 0; n_bypass = 0; n_turn = 0;
    start = 1'b0; n_iter = '0; rd_base = 16'h0100; wr_base = 16'h0800;
    @(posedge rst_n);
    protocol_base = protocol_errors;   // pins are unknown before reset
    foreach (runs[r]) begin
      int n, cycles;
      n = runs[r];
      rd_base = 16'(16'h0100 + r * 16'h0013);
      wr_base = 16'(16'h0800 + r * 16'h0200);
      @(posedge clk); #1;
      start = 1'b1; n_iter = 16'(n);
      @(posedge clk); #1;
      start = 1'b0;
      cycles = 0;
      while (!done && cycles < 100000) begin
        @(posedge clk); #1;
        cycles++;
      end
      check($sformatf("loop of %0d takes (n+M)*II = %0d cycles (got %0d)",
                      n, (n + EXP_M) * II, cycles), cycles == (n + EXP_M) * II);
      repeat (3) @(posedge clk);
      #1;
      for (int i = 0; i < n; i++) begin
        logic [31:0] s;
        s = '0;
        for (int k = 0; k < NRD; k++) s += init_word(int'(rd_base) + i * NRD + k);
        for (int k = 0; k < NWR; k++)
          check($sformatf("result %0d.%0d in memory", i, k),
                u_mem.mem[int'(wr_base) + i * NWR + k] == s + 32'(k));
      end
      check("word after the results untouched",
            u_mem.mem[int'(wr_base) + n * NWR] == init_word(int'(wr_base) + n * NWR));
    end
    check("memory protocol", protocol_errors == protocol_base);
    n_turn = turnarounds;
    finished = 1'b1;
  end
endmodule
