// air_hockey_top: the FPGA logic of one air hockey terminal.
//
// Each of the two terminals of the networked game is a soft processor
// system: the processor runs the game physics, reads the PS/2 mouse, trades
// paddle and puck positions with the other terminal over Ethernet and
// writes what is to be shown into the display registers. This module holds
// the hardware written for the game: the VGA raster display (vga_raster)
// with its register file on the processor bus, and the 25 MHz clock of the
// Ethernet chip, half the 50 MHz board clock. The processor, the memory and
// its controller, the PS/2 port, the Ethernet controller and the bus fabric
// sit outside; the display's bus slave port is brought out as plain signals
// (chipselect, read, write, 5-bit word address, 16-bit data, no wait
// states). Interrupts and the other peripherals do not touch this logic.
// Following the original board top level, the reset input may be tied high.
module air_hockey_top
  import ah_pkg::*;
(
  input  logic               clk,             // 50 MHz board clock
  input  logic               reset_n,         // synchronous, active low
  // display register slave
  input  logic               avs_chipselect,
  input  logic               avs_read,
  input  logic               avs_write,
  input  logic [BUS_AW-1:0]  avs_address,
  input  logic [BUS_DW-1:0]  avs_writedata,
  output logic [BUS_DW-1:0]  avs_readdata,
  // VGA DAC and connector
  output logic               VGA_CLK,
  output logic               VGA_HS,
  output logic               VGA_VS,
  output logic               VGA_BLANK,
  output logic               VGA_SYNC,
  output logic [COLOR_W-1:0] VGA_R,
  output logic [COLOR_W-1:0] VGA_G,
  output logic [COLOR_W-1:0] VGA_B,
  // Ethernet chip clock
  output logic               ENET_CLK         // 25 MHz
);
  bus_req_t req;
  assign req = '{chipselect: avs_chipselect, read: avs_read, write: avs_write,
                 address: avs_address, writedata: avs_writedata};

  logic enet_en_unused;

  clk_div2 u_enet_clk (.clk, .rst_n(reset_n), .clk_half(ENET_CLK), .en(enet_en_unused));

  vga_raster u_vga (
    .clk, .rst_n(reset_n), .req, .readdata(avs_readdata),
    .VGA_CLK, .VGA_HS, .VGA_VS, .VGA_BLANK, .VGA_SYNC, .VGA_R, .VGA_G, .VGA_B
  );
endmodule
