// tb_cfg_manager: self-checking test of the configuration manager.
//
// Checks that an application switch raises hold at once, waits while the
// network is busy, changes app_sel only after two quiet clocks, pulses
// app_done, reports the switch duration, and that the configuration bus is
// registered once.
module tb_cfg_manager;
  import noc_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic app_req = 1'b0, app_next = 1'b0, net_busy = 1'b0;
  logic app_sel, hold, app_done;
  logic [15:0] switch_cycles;
  logic h_we = 1'b0, h_app = 1'b0;
  logic [7:0] h_pos = '0;
  logic [NODE_W-1:0] h_idx = '0;
  logic [15:0] h_data = '0;
  logic c_we, c_app;
  logic [7:0] c_pos;
  logic [NODE_W-1:0] c_idx;
  logic [15:0] c_data;
  int checks = 0, failures = 0, dones = 0;

  cfg_manager #(.NAPP(2)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) if (rst_n && app_done) dones++;

  task automatic chk(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s (t=%0t)", what, $time); end
  endtask

  initial begin
    repeat (500) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    chk(app_sel == 1'b0 && !hold, "application 0 after reset");
    h_we = 1'b1; h_pos = 8'd17; h_app = 1'b1; h_idx = 8'd4; h_data = 16'hBEEF;
    #1 chk(!c_we, "bus not yet out");
    @(negedge clk);
    chk(c_we && c_pos == 8'd17 && c_app && c_idx == 8'd4 && c_data == 16'hBEEF, "bus registered once");
    h_we = 1'b0;
    net_busy = 1'b1;
    app_req = 1'b1; app_next = 1'b1;
    @(negedge clk);
    app_req = 1'b0;
    chk(hold, "hold raised at once");
    repeat (10) @(negedge clk);
    chk(app_sel == 1'b0 && hold, "no switch while the network is busy");
    net_busy = 1'b0;
    @(negedge clk);
    chk(app_sel == 1'b0, "one quiet clock is not enough");
    net_busy = 1'b1;   // a path appears again
    @(negedge clk);
    chk(app_sel == 1'b0 && hold, "busy again before the second quiet clock: still waiting");
    net_busy = 1'b0;
    repeat (2) @(negedge clk);
    chk(app_sel == 1'b1 && !hold && app_done, "switched after two quiet clocks");
    @(negedge clk);
    chk(dones == 1 && !app_done, "app_done pulsed once");
    $display("switch took %0d clocks", switch_cycles);
    chk(switch_cycles == 16'd14, "switch duration = clocks with hold high");
    @(negedge clk);
    app_req = 1'b1; app_next = 1'b0;
    @(negedge clk);
    app_req = 1'b0;
    repeat (3) @(negedge clk);
    chk(app_sel == 1'b0 && dones == 2, "switch back when the network is idle");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
