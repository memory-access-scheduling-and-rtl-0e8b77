// ext_mem_model: behavioural model of the external single-port memory used
// by the testbenches. It is synchronous: on a rising edge with the strobe low
// it writes the bus word (write select driven low) or reads a word (write
// select driven high), and a read word stays on the bus output from the next
// cycle on (one cycle of read latency). Word a starts as init_word(a).
// A write without the data bus driven, or a strobe without a driven write
// select, is counted as a protocol error.
module ext_mem_model #(
  parameter int DATA_W = 32,
  parameter int ADDR_W = 16,
  parameter int WORDS  = 4096
) (
  input  logic              clk,
  input  logic              mem_strobe_n,
  input  logic              mem_write_sel_n,
  input  logic              mem_write_sel_oe,
  input  logic [ADDR_W-1:0] mem_addr,
  input  logic [DATA_W-1:0] mem_data_o,
  input  logic              mem_data_oe,
  output logic [DATA_W-1:0] mem_data_i,
  output int                protocol_errors,
  output int                turnarounds
);
  logic [DATA_W-1:0] mem [WORDS];
  logic              last_was_read;

  function automatic logic [DATA_W-1:0] init_word(int a);
    return DATA_W'(a * 32'h9E37_79B1 ^ 32'h0000_5A5A);
  endfunction

  initial begin
    for (int a = 0; a < WORDS; a++) mem[a] = init_word(a);
    mem_data_i = '0;
    protocol_errors = 0;
    turnarounds = 0;
    last_was_read = 1'b0;
  end

  always @(posedge clk) begin
    if (!mem_strobe_n) begin
      if (!mem_write_sel_oe) protocol_errors++;
      else if (!mem_write_sel_n) begin
        if (!mem_data_oe) protocol_errors++;
        mem[int'(mem_addr) % WORDS] <= mem_data_o;
        if (last_was_read) turnarounds++;
        last_was_read = 1'b0;
      end else begin
        if (mem_data_oe) protocol_errors++;
        mem_data_i <= mem[int'(mem_addr) % WORDS];
        last_was_read = 1'b1;
      end
    end
  end
endmodule
