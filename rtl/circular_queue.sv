// circular_queue: ring buffer that holds results between the cycle the
// internal circuit produces them and the cycle they are written to memory.
//
// DEPTH words are kept in an array addressed by a write pointer and a read
// pointer that both wrap around. When qw_en is high, wr_data is stored at the
// write pointer on the rising clock edge. The oldest entry is always present
// on rd_data (combinational read); qr_en high consumes it on the same edge.
// A write and a read in one cycle are allowed even when the queue is full:
// the read takes the old word from the slot that the write then refills.
// Writing into a full queue without reading, or reading an empty queue, is a
// scheduling error and is flagged by assertions.
//
// The queue itself, its two enables and its role follow the published
// standardization scheme; the pointer implementation, the count output and
// the synchronous active-low reset are this design's choices.
module circular_queue #(
  parameter int W     = 32,
  parameter int DEPTH = 2
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       qw_en,
  input  logic [W-1:0]               wr_data,
  input  logic                       qr_en,
  output logic [W-1:0]               rd_data,
  output logic [$clog2(DEPTH+1)-1:0] count
);
  localparam int AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  localparam int CW = $clog2(DEPTH+1);

  logic [W-1:0]  mem [DEPTH];
  logic [AW-1:0] wptr, rptr;

  function automatic logic [AW-1:0] incr(logic [AW-1:0] p);
    return (32'(p) == DEPTH - 1) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (qw_en) mem[wptr] <= wr_data;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wptr  <= '0;
      rptr  <= '0;
      count <= '0;
    end else begin
      if (qw_en) wptr <= incr(wptr);
      if (qr_en) rptr <= incr(rptr);
      count <= count + CW'(qw_en) - CW'(qr_en);
    end
  end

  assign rd_data = mem[rptr];

  property p_no_overflow;
    @(posedge clk) disable iff (!rst_n)
      qw_en && !qr_en |-> 32'(count) < DEPTH;
  endproperty
  property p_no_underflow;
    @(posedge clk) disable iff (!rst_n) qr_en |-> count != '0;
  endproperty
  a_no_overflow:  assert property (p_no_overflow)  else $error("circular_queue: write to full queue");
  a_no_underflow: assert property (p_no_underflow) else $error("circular_queue: read from empty queue");

endmodule
