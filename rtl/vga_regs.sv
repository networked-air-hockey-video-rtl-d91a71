// vga_regs: bus register file of the display.
//
// A memory-mapped slave with 16-bit data and word addresses. A write with
// chipselect high stores bits 9:0 of writedata in the addressed register:
// 0/1 local paddle x/y, 2/3 remote paddle x/y, 4/5 puck x/y, 7 player 1
// score, 8 player 2 score. Other addresses are ignored on write and read as
// 0. Reads return the addressed register, zero-extended, in the same cycle
// (no wait states, combinational readdata). Reset loads the start-up
// picture: local paddle at (525,112), remote paddle at (127,127), puck at
// the centre (320,232), both scores 0. The addresses, the 10-bit registers
// and the start-up positions follow the original game; the read path and
// the reset are this design's own.
module vga_regs
  import ah_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,      // synchronous, active low
  input  bus_req_t          req,
  output logic [BUS_DW-1:0] readdata,
  output disp_state_t       state
);
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state.user_x   <= USER_X0;
      state.user_y   <= USER_Y0;
      state.remote_x <= REMOTE_X0;
      state.remote_y <= REMOTE_Y0;
      state.puck_x   <= PUCK_X0;
      state.puck_y   <= PUCK_Y0;
      state.score1   <= '0;
      state.score2   <= '0;
    end else if (req.chipselect && req.write) begin
      case (req.address)
        REG_USER_X:   state.user_x   <= req.writedata[COORD_W-1:0];
        REG_USER_Y:   state.user_y   <= req.writedata[COORD_W-1:0];
        REG_REMOTE_X: state.remote_x <= req.writedata[COORD_W-1:0];
        REG_REMOTE_Y: state.remote_y <= req.writedata[COORD_W-1:0];
        REG_PUCK_X:   state.puck_x   <= req.writedata[COORD_W-1:0];
        REG_PUCK_Y:   state.puck_y   <= req.writedata[COORD_W-1:0];
        REG_SCORE1:   state.score1   <= req.writedata[COORD_W-1:0];
        REG_SCORE2:   state.score2   <= req.writedata[COORD_W-1:0];
        default: ;
      endcase
    end
  end

  always_comb begin
    readdata = '0;
    case (req.address)
      REG_USER_X:   readdata = BUS_DW'(state.user_x);
      REG_USER_Y:   readdata = BUS_DW'(state.user_y);
      REG_REMOTE_X: readdata = BUS_DW'(state.remote_x);
      REG_REMOTE_Y: readdata = BUS_DW'(state.remote_y);
      REG_PUCK_X:   readdata = BUS_DW'(state.puck_x);
      REG_PUCK_Y:   readdata = BUS_DW'(state.puck_y);
      REG_SCORE1:   readdata = BUS_DW'(state.score1);
      REG_SCORE2:   readdata = BUS_DW'(state.score2);
      default:      readdata = '0;
    endcase
  end

  // A bus master never reads and writes in the same cycle.
  a_rw_exclusive: assert property (@(posedge clk) disable iff (!rst_n)
                                   req.chipselect |-> !(req.read && req.write));
endmodule
