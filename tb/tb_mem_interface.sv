// tb_mem_interface: self-checking test of the memory interface.
//
// Random requests (idle, read, write) with random addresses and data are
// applied on the internal side. One cycle later the pins must carry the
// same strobe, write select (value and enable) and address, the data bus
// must be driven with the write word exactly in write cycles, and Data_In
// must follow the bus input. After reset the strobe is high and both
// write select and data bus are released.
module tb_mem_interface;
  logic clk = 1'b0;
  logic rst_n;
  logic strobe_n, ws_drv, ws_val;
  logic [15:0] addr;
  logic [31:0] data_out, data_in;
  logic mem_strobe_n, mem_write_sel_n, mem_write_sel_oe, mem_data_oe;
  logic [15:0] mem_addr;
  logic [31:0] mem_data_o, mem_data_i;

  int checks = 0, failures = 0;
  int n_rd = 0, n_wr = 0;

  mem_interface #(.DATA_W(32), .ADDR_W(16)) dut (.*);

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
    logic p_strobe_n, p_drv, p_val, p_wr;
    logic [15:0] p_addr;
    logic [31:0] p_data;
    rst_n = 1'b0;
    strobe_n = 1'b0; ws_drv = 1'b1; ws_val = 1'b0; addr = '0; data_out = '0;
    mem_data_i = '0;
    repeat (3) @(posedge clk);
    #1;
    check("reset: strobe high", mem_strobe_n);
    check("reset: write select released", !mem_write_sel_oe);
    check("reset: bus released", !mem_data_oe);
    rst_n = 1'b1;
    for (int i = 0; i < 2000; i++) begin
      int kind;
      kind = $urandom_range(0, 2);
      strobe_n = (kind == 0);
      ws_drv   = (kind != 0);
      ws_val   = (kind == 1);
      addr     = 16'($urandom);
      data_out = $urandom;
      mem_data_i = $urandom;
      #1;
      check("Data_In follows the bus", data_in == mem_data_i);
      p_strobe_n = strobe_n; p_drv = ws_drv; p_val = ws_val;
      p_addr = addr; p_data = data_out;
      p_wr = (kind == 2);
      if (kind == 1) n_rd++;
      if (kind == 2) n_wr++;
      @(posedge clk);
      #1;
      check("strobe registered", mem_strobe_n == p_strobe_n);
      check("write select enable", mem_write_sel_oe == p_drv);
      if (p_drv) check("write select value", mem_write_sel_n == p_val);
      check("address registered", mem_addr == p_addr);
      check("bus driven only for writes", mem_data_oe == p_wr);
      if (p_wr) check("write data", mem_data_o == p_data);
    end
    check("reads and writes both exercised", n_rd > 100 && n_wr > 100);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
