// mem_interface: the FPGA side of the external memory port. It sits between
// the internal circuit (Strobe_n, Write_Sel_n, address, Data_Out towards
// memory; Data_In back from memory) and the memory pins (address, strobe,
// write select and a bidirectional data bus).
//
// All outgoing signals go through one rank of output registers, as pad
// registers would: the strobe, the three-valued write select (modelled as a
// value and an output enable, since a released line reads as high
// impedance), the address and the write data. The data bus is driven only in
// a cycle that writes (strobe low, write select driven low); otherwise it is
// released so the memory can drive it. Read data from the bus is passed to
// Data_In without a register, so data_in is wired straight to mem_data_i;
// a register there would add a cycle to the read delay.
//
// Timing: a request presented in cycle t is on the pins in cycle t + 1. With
// a synchronous memory that answers a read one cycle after it samples it,
// the read word is on Data_In in cycle t + 2 (read delay dR = 2) and a write
// word is taken from Data_Out in the request cycle (write delay dW = 0),
// the delays of the worked example of the scheme. After reset the strobe is
// high and both write select and data bus are released (timing rule 1).
//
// The block and its signal names come from the published computation model;
// its register structure and the split of the tri-state bus into
// out / enable / in are this design's choices.
module mem_interface #(
  parameter int DATA_W = 32,
  parameter int ADDR_W = 16
) (
  input  logic              clk,
  input  logic              rst_n,
  // internal circuit side
  input  logic              strobe_n,
  input  logic              ws_drv,
  input  logic              ws_val,
  input  logic [ADDR_W-1:0] addr,
  input  logic [DATA_W-1:0] data_out,
  output logic [DATA_W-1:0] data_in,
  // memory pins
  output logic              mem_strobe_n,
  output logic              mem_write_sel_n,
  output logic              mem_write_sel_oe,
  output logic [ADDR_W-1:0] mem_addr,
  output logic [DATA_W-1:0] mem_data_o,
  output logic              mem_data_oe,
  input  logic [DATA_W-1:0] mem_data_i
);
  logic is_write;
  assign is_write = !strobe_n && ws_drv && !ws_val;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      mem_strobe_n     <= 1'b1;
      mem_write_sel_n  <= 1'b1;
      mem_write_sel_oe <= 1'b0;
      mem_data_oe      <= 1'b0;
    end else begin
      mem_strobe_n     <= strobe_n;
      mem_write_sel_n  <= ws_val;
      mem_write_sel_oe <= ws_drv;
      mem_data_oe      <= is_write;
    end
  end

  always_ff @(posedge clk) begin
    mem_addr   <= addr;
    if (is_write) mem_data_o <= data_out;
  end

  assign data_in = mem_data_i;

  // The bus is driven only while a write is on the pins.
  a_bus_dir: assert property (@(posedge clk) disable iff (!rst_n)
                              mem_data_oe |-> !mem_strobe_n && mem_write_sel_oe && !mem_write_sel_n)
    else $error("mem_interface: data bus driven outside a write");

endmodule
