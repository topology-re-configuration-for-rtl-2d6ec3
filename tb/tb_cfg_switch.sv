// tb_cfg_switch: self-checking test of the configuration switch.
//
// Application 0 joins S<->N (primary) with an E detour (alternate); it checks
// the pass-through of data and ACK without a register, the one-clock
// connection set-up, tear-down, the move to the detour on NACK and on a
// damaged output, NACK back-tracking when the detour also fails, independent
// use of both sub-links of a link, and selection of application 1
// (E<->W). Expected values are written out by hand from the 8-bit words.
module tb_cfg_switch;
  import noc_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic app_sel = 1'b0, cfg_we = 1'b0, cfg_app = 1'b0;
  logic [7:0] cfg_prim = '0, cfg_alt = '0;
  fwd_t i_fwd [4], o_fwd [4];
  bwd_t i_bwd [4], o_bwd [4];
  logic [3:0] fault = '0;
  logic ev_alt, ev_nack;
  int checks = 0, failures = 0, n_alt = 0, n_nack = 0;

  cfg_switch #(.NAPP(2)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) if (rst_n) begin
    if (ev_alt) n_alt++;
    if (ev_nack) n_nack++;
  end

  task automatic chk(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic fwd_t probe(input logic [NODE_W-1:0] d);
    fwd_t f = '0; f.req = 1'b1; f.data[NODE_W-1:0] = d; return f;
  endfunction

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4; i++) begin i_fwd[i] = '0; i_bwd[i] = '0; end
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    // app 0: N<-S, S<-N, E off, W off ; alt: E<-S, S<-E
    @(negedge clk); cfg_we = 1; cfg_app = 0;
    cfg_prim = {2'd3, 2'd0, 2'd1, 2'd2}; cfg_alt = {2'd3, 2'd1, 2'd2, 2'd0};
    @(negedge clk); cfg_app = 1;
    cfg_prim = {2'd1, 2'd2, 2'd3, 2'd0}; cfg_alt = {2'd3, 2'd2, 2'd1, 2'd0};
    @(negedge clk); cfg_we = 0;
    for (int o = 0; o < 4; o++) chk(o_fwd[o] == '0, "outputs idle after reset");

    // primary connection S -> N
    i_fwd[2] = probe(8'd5);
    #1 chk(o_fwd[0].req == 1'b0, "no connection before the set-up clock");
    @(negedge clk);
    chk(o_fwd[0] == i_fwd[2], "probe passes S->N");
    chk(o_fwd[1].req == 1'b0 && o_fwd[3].req == 1'b0, "E and W stay idle");
    i_bwd[0].ack = 1'b1;
    #1 chk(o_bwd[2].ack && !o_bwd[2].nack, "ACK passes N->S without a register");
    i_fwd[2].vld = 1'b1; i_fwd[2].data = 64'hDEAD_BEEF_0123_4567;
    #1 chk(o_fwd[0].data == 64'hDEAD_BEEF_0123_4567 && o_fwd[0].vld, "data passes without a register");
    // reverse sub-link N -> S at the same time
    i_fwd[0] = probe(8'd9);
    @(negedge clk);
    chk(o_fwd[2] == i_fwd[0], "reverse sub-link N->S independent");
    chk(o_fwd[0].data == 64'hDEAD_BEEF_0123_4567, "forward connection kept");
    // tear down both
    i_fwd[2] = '0; i_fwd[0] = '0;
    @(negedge clk);
    chk(o_fwd[0] == '0 && o_fwd[2] == '0, "tear-down releases outputs");
    i_bwd[0] = '0;
    @(negedge clk);

    // NACK on the primary: detour through E
    i_fwd[2] = probe(8'd3);
    @(negedge clk);
    chk(o_fwd[0].req, "probe on primary");
    i_bwd[0].nack = 1'b1;
    #1 chk(!o_bwd[2].nack, "primary NACK is not passed upstream");
    @(negedge clk);
    chk(o_fwd[1] == i_fwd[2] && !o_fwd[0].req, "probe moved to the detour E");
    chk(!o_bwd[2].nack, "still no NACK upstream");
    chk(n_alt == 1, "detour event counted");
    i_bwd[0].nack = 1'b0;
    i_bwd[1].nack = 1'b1;   // detour blocked too
    @(negedge clk);
    chk(o_bwd[2].nack && !o_fwd[1].req, "back-track: NACK upstream when detour fails");
    chk(n_nack == 1, "NACK event counted");
    i_fwd[2] = '0; i_bwd[1].nack = 1'b0;
    @(negedge clk);
    chk(!o_bwd[2].nack, "NACK drops with req");
    @(negedge clk);

    // damaged primary: straight onto the detour
    fault[0] = 1'b1;
    i_fwd[2] = probe(8'd4);
    @(negedge clk);
    chk(o_fwd[1].req && !o_fwd[0].req, "damaged N avoided");
    chk(n_alt == 2, "detour event for damaged link");
    i_bwd[1].ack = 1'b1;
    #1 chk(o_bwd[2].ack, "ACK returns over the detour");
    i_fwd[2] = '0;
    @(negedge clk);
    i_bwd[1].ack = 1'b0; fault = '0;
    @(negedge clk);

    // input with no route at all: immediate NACK
    i_fwd[3] = probe(8'd1);
    @(negedge clk);
    chk(o_bwd[3].nack, "unrouted input answered with NACK");
    i_fwd[3] = '0;
    @(negedge clk);

    // application 1: N off, E<-W, S off, W<-E
    app_sel = 1'b1;
    i_fwd[3] = probe(8'd7);
    @(negedge clk);
    chk(o_fwd[1] == i_fwd[3], "app 1 joins W->E");
    i_fwd[2] = probe(8'd8);
    @(negedge clk);
    chk(!o_fwd[0].req && o_bwd[2].nack, "app 1 has no S->N connection");
    i_fwd[2] = '0; i_fwd[3] = '0;
    @(negedge clk); @(negedge clk);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
