// tb_ni_wrapper: self-checking test of the node wrapper.
//
// The test plays the router: it answers the wrapper's probe with NACK once
// (checking back-off of BACKOFF clocks and a new probe), then with ACK, and
// checks that exactly tx_len words leave in order, one per clock, that req
// falls afterwards and tx_done follows the ACK's removal. It checks that
// hold delays a probe. On the sink side it opens a path into the wrapper and
// checks ACK, delivery of data words and NACK when the core is not ready.
module tb_ni_wrapper;
  import noc_pkg::*;

  localparam int BACKOFF = 4;
  logic clk = 1'b0, rst_n = 1'b0, hold = 1'b0;
  logic tx_start = 1'b0;
  logic [NODE_W-1:0] tx_dest = '0;
  logic [15:0] tx_len = '0;
  logic [DW_DEF-1:0] tx_data;
  logic tx_pop, tx_busy, tx_done, ev_retry;
  logic rx_ready = 1'b1, rx_vld, rx_done;
  logic [DW_DEF-1:0] rx_data;
  fwd_t o_fwd, i_fwd;
  bwd_t i_bwd, o_bwd;
  logic busy;
  int checks = 0, failures = 0, words = 0, nextw = 0, retries = 0;

  ni_wrapper #(.BACKOFF(BACKOFF), .LEN_W(16)) dut (.*);

  always #5 clk = ~clk;
  // core: word k of the transfer is 64'hA000 + k
  assign tx_data = 64'hA000 + 64'(nextw);
  always @(posedge clk) if (rst_n) begin
    if (tx_pop) nextw <= nextw + 1;
    if (ev_retry) retries++;
  end

  task automatic chk(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s (t=%0t)", what, $time); end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t0, gap;
    i_bwd = '0; i_fwd = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    hold = 1'b1;
    tx_start = 1'b1; tx_dest = 8'd3; tx_len = 16'd5;
    @(negedge clk);
    tx_start = 1'b0;
    repeat (3) @(negedge clk);
    chk(!o_fwd.req && tx_busy, "hold keeps the probe back");
    hold = 1'b0;
    @(negedge clk); @(negedge clk);
    chk(o_fwd.req && !o_fwd.vld && o_fwd.data[NODE_W-1:0] == 8'd3, "probe carries the destination");
    // NACK once
    i_bwd.nack = 1'b1;
    #1 chk(ev_retry, "retry event on NACK");
    @(negedge clk);
    chk(!o_fwd.req, "req dropped after NACK");
    i_bwd.nack = 1'b0;
    t0 = $time; gap = 0;
    while (!o_fwd.req && gap < 50) begin @(negedge clk); gap++; end
    chk(gap == BACKOFF + 1, "new probe after the back-off");
    chk(retries == 1, "one retry counted");
    // ACK: expect five words
    i_bwd.ack = 1'b1;
    @(negedge clk);
    for (int w = 0; w < 5; w++) begin
      chk(o_fwd.req && o_fwd.vld && o_fwd.data == 64'hA000 + 64'(w), "word sent in order, one per clock");
      @(negedge clk);
    end
    chk(!o_fwd.req && !o_fwd.vld, "path closed after the last word");
    chk(!tx_done, "done waits for ACK removal");
    i_bwd.ack = 1'b0;
    #1 chk(tx_done, "tx_done once ACK is gone");
    @(negedge clk);
    chk(!tx_busy && nextw == 5, "idle, five words taken");

    // sink side
    i_fwd.req = 1'b1; i_fwd.data = 64'd9;
    #1 chk(busy, "busy with an incoming probe");
    @(negedge clk);
    chk(o_bwd.ack && !o_bwd.nack, "incoming path acknowledged");
    i_fwd.vld = 1'b1; i_fwd.data = 64'h55;
    #1 chk(rx_vld && rx_data == 64'h55, "word delivered");
    @(negedge clk);
    i_fwd = '0;
    #1 chk(rx_done, "rx_done when the sender closes");
    @(negedge clk);
    chk(!o_bwd.ack, "ACK removed");
    rx_ready = 1'b0;
    i_fwd.req = 1'b1;
    @(negedge clk);
    chk(o_bwd.nack && !o_bwd.ack, "NACK when the core is not ready");
    i_fwd = '0;
    @(negedge clk);
    chk(!o_bwd.nack, "NACK removed");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
