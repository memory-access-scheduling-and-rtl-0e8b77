// write_standardizer: moves the results of the internal circuit from the
// cycles in which the circuit produces them to the cycles of the standard
// memory access schedule, where all writes of a loop body sit together at
// its end.
//
// It is a circular queue followed by a 2:1 multiplexer. A result produced
// well before its write slot is pushed into the queue (qw_en) and popped in
// its slot (qr_en), with qm_sel = 0 selecting the queue head. Results that
// the circuit already produces in the trailing write slots go straight
// through (qm_sel = 1 selects result). The enables come from a schedule
// computed by mas_pkg::queue_scan, so this block has no control of its own;
// data_out is combinational from result and from the queue head.
//
// Structure, signal names and multiplexer polarity follow the published
// scheme; DEPTH is set by the instantiating module from the schedule.
module write_standardizer #(
  parameter int W     = 32,
  parameter int DEPTH = 2
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] result,
  input  logic         qw_en,
  input  logic         qr_en,
  input  logic         qm_sel,
  output logic [W-1:0] data_out
);
  logic [W-1:0] q_head;

  circular_queue #(.W(W), .DEPTH(DEPTH)) u_queue (
    .clk     (clk),
    .rst_n   (rst_n),
    .qw_en   (qw_en),
    .wr_data (result),
    .qr_en   (qr_en),
    .rd_data (q_head),
    .count   ()
  );

  always_comb data_out = qm_sel ? result : q_head;

endmodule
