// tb_vga_regs: reset values of the display registers, write and read back of
// every register, writes ignored without chipselect or to unused addresses,
// 10-bit truncation of the written data.
module tb_vga_regs;
  import ah_pkg::*;
  logic clk = 0, rst_n = 0;
  bus_req_t req;
  logic [BUS_DW-1:0] readdata;
  disp_state_t state;
  int checks = 0, failures = 0;

  vga_regs dut (.clk, .rst_n, .req, .readdata, .state);

  always #10 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic wr(input int a, input int d, input bit cs = 1);
    @(negedge clk);
    req = '{chipselect: cs, read: 0, write: 1, address: BUS_AW'(a), writedata: BUS_DW'(d)};
    @(negedge clk);
    req = '0;
  endtask

  // readdata is combinational: it follows the address in the same cycle.
  task automatic rd(input int a, output int v);
    req = '{chipselect: 1, read: 1, write: 0, address: BUS_AW'(a), writedata: '0};
    #1;
    v = int'(readdata);
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int model [9];
    int a, d, v;
    req = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    model = '{525, 112, 127, 127, 320, 232, 0, 0, 0};
    @(negedge clk);
    for (int i = 0; i < 9; i++) begin
      rd(i, v);
      check(v == model[i], $sformatf("reset value at %0d: %0d", i, v));
    end
    req = '0;
    check(state.puck_x == 10'd320 && state.user_x == 10'd525, "state struct after reset");
    for (int n = 0; n < 300; n++) begin
      a = $urandom_range(0, 12);
      d = $urandom_range(0, 65535);
      wr(a, d, (n % 7) != 3);
      if ((n % 7) != 3 && a <= 8 && a != 6) model[a] = d & 10'h3FF;
      @(negedge clk);
      for (int i = 0; i < 13; i++) begin
        rd(i, v);
        check(v == ((i <= 8) ? model[i] : 0), $sformatf("addr %0d read %0d", i, v));
      end
      req = '0;
    end
    check(int'(state.user_x) == model[0] && int'(state.user_y) == model[1] &&
          int'(state.remote_x) == model[2] && int'(state.remote_y) == model[3] &&
          int'(state.puck_x) == model[4] && int'(state.puck_y) == model[5] &&
          int'(state.score1) == model[7] && int'(state.score2) == model[8], "state struct");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
