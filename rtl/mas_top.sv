// mas_top: memory subsystem of an FPGA that runs a pipelined loop against
// one external single-port memory.
//
// The loop computation itself (the internal circuit) is synthesized
// separately and connects through the ports marked "internal circuit": it
// receives its operands on din while din_valid is high (din_first marks the
// first operand of an iteration) and hands back its results on result in the
// cycles given by ORIG_WR. This block supplies the rest:
//
//   mem_access_ctrl     plays the modulo schedule: every II = NRD + NWR
//                       cycles the memory does NRD reads and NWR writes, with
//                       a prologue and an epilogue of M*II cycles each.
//   write_standardizer  circular queue + multiplexer that holds each result
//                       from the cycle the circuit produces it until its
//                       write slot, D cycles after the standard position.
//   mem_interface       output registers and bus direction for the pins.
//
// Interface and timing. Pulse start with n_iter >= M (and >= 1) while busy is
// low; the loop takes (n_iter + M) * II cycles, after which done pulses.
// Operand words are read from rd_base upwards, results written from wr_base
// upwards. The memory pins follow the controller by one cycle. DR must equal
// the read delay of the memory system (2 for a memory with one cycle of read
// latency behind mem_interface) and DW its write delay (0).
//
// Parameter defaults are the scheme's worked example: six reads, three
// compute cycles and two writes per iteration, dR = 2 and dW = 0, with the
// circuit producing its results in the standard slots (cycles 9 and 10 of
// the body). Widths, base addresses and the handshake are this design's.
module mas_top
  import mas_pkg::*;
#(
  parameter int          NRD     = 6,
  parameter int          NC      = 3,
  parameter int          NWR     = 2,
  parameter int          DR      = 2,
  parameter int          DW      = 0,
  parameter logic [63:0] ORIG_WR = 64'h600,
  parameter int          DATA_W  = 32,
  parameter int          ADDR_W  = 16,
  parameter int          NITER_W = 16
) (
  input  logic               clk,
  input  logic               rst_n,
  // loop control
  input  logic               start,
  input  logic [NITER_W-1:0] n_iter,
  input  logic [ADDR_W-1:0]  rd_base,
  input  logic [ADDR_W-1:0]  wr_base,
  output logic               busy,
  output logic               done,
  output phase_t             phase,
  // internal circuit
  output logic [DATA_W-1:0]  din,
  output logic               din_valid,
  output logic               din_first,
  input  logic [DATA_W-1:0]  result,
  // queue activity (observability)
  output logic               qw_en,
  output logic               qr_en,
  output logic               qm_sel,
  // external memory pins
  output logic               mem_strobe_n,
  output logic               mem_write_sel_n,
  output logic               mem_write_sel_oe,
  output logic [ADDR_W-1:0]  mem_addr,
  output logic [DATA_W-1:0]  mem_data_o,
  output logic               mem_data_oe,
  input  logic [DATA_W-1:0]  mem_data_i
);
  localparam int QDEPTH = std_queue_depth(NRD, NC, NWR, DR, DW, ORIG_WR);

  logic              c_strobe_n, c_ws_drv, c_ws_val;
  logic [ADDR_W-1:0] c_addr;
  logic [DATA_W-1:0] data_out;

  mem_access_ctrl #(
    .NRD(NRD), .NC(NC), .NWR(NWR), .DR(DR), .DW(DW), .ORIG_WR(ORIG_WR),
    .ADDR_W(ADDR_W), .NITER_W(NITER_W)
  ) u_ctrl (
    .clk          (clk),
    .rst_n        (rst_n),
    .start        (start),
    .n_iter       (n_iter),
    .rd_base      (rd_base),
    .wr_base      (wr_base),
    .phase        (phase),
    .busy         (busy),
    .done         (done),
    .mem_strobe_n (c_strobe_n),
    .mem_ws_drv   (c_ws_drv),
    .mem_ws_val   (c_ws_val),
    .mem_addr     (c_addr),
    .din_valid    (din_valid),
    .din_first    (din_first),
    .qw_en        (qw_en),
    .qr_en        (qr_en),
    .qm_sel       (qm_sel)
  );

  write_standardizer #(.W(DATA_W), .DEPTH(QDEPTH)) u_std (
    .clk      (clk),
    .rst_n    (rst_n),
    .result   (result),
    .qw_en    (qw_en),
    .qr_en    (qr_en),
    .qm_sel   (qm_sel),
    .data_out (data_out)
  );

  mem_interface #(.DATA_W(DATA_W), .ADDR_W(ADDR_W)) u_if (
    .clk              (clk),
    .rst_n            (rst_n),
    .strobe_n         (c_strobe_n),
    .ws_drv           (c_ws_drv),
    .ws_val           (c_ws_val),
    .addr             (c_addr),
    .data_out         (data_out),
    .data_in          (din),
    .mem_strobe_n     (mem_strobe_n),
    .mem_write_sel_n  (mem_write_sel_n),
    .mem_write_sel_oe (mem_write_sel_oe),
    .mem_addr         (mem_addr),
    .mem_data_o       (mem_data_o),
    .mem_data_oe      (mem_data_oe),
    .mem_data_i       (mem_data_i)
  );

endmodule
