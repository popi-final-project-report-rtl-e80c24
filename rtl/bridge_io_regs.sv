// bridge_io_regs: the register stage at the pins of the shared peripheral bus.
//
// Every signal the bridge drives onto the board bus (address, chip selects,
// OE#/WE#, UB#/LB#, write data and the data tristate control) and the
// halfword read back from the data pins passes through one flip-flop meant
// to be packed into the FPGA's I/O blocks, so the pins change cleanly on the
// clock edge and the bus timing does not depend on the routing inside the
// chip. Everything at the pins is therefore one clock behind the
// controller's outputs, and read data reaches the bridge one clock after it
// was on the pins.
//
// Reset is asynchronous and active high: the address clears to zero, every
// other register presets to one, so all strobes are inactive, the data pins
// are released and the captured data reads all ones. The pad buffers
// themselves are FPGA primitives and are not part of this module: the
// bidirectional data bus appears as pb_dout / pb_din, with pb_ctrl.d_t as
// its tristate control.
module bridge_io_regs
  import popi_pkg::*;
(
  input  logic     clk,
  input  logic     rst,
  input  pb_addr_t addr_d,
  input  pb_ctrl_t ctrl_d,
  input  pb_data_t wdata_d,
  output pb_addr_t pb_a,
  output pb_ctrl_t pb_ctrl,
  output pb_data_t pb_dout,   // data driven onto the pins
  input  pb_data_t pb_din,    // data seen on the pins
  output pb_data_t din_q      // pb_din, registered
);

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      pb_a    <= '0;
      pb_ctrl <= PB_CTRL_IDLE;
      pb_dout <= '1;
      din_q   <= '1;
    end else begin
      pb_a    <= addr_d;
      pb_ctrl <= ctrl_d;
      pb_dout <= wdata_d;
      din_q   <= pb_din;
    end
  end

endmodule
