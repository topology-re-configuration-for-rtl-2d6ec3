// noc_top: reconfigurable network-on-chip with back-tracking.
//
// M x N nodes (router + wrapper, with the IP core outside this module) are
// laid out on a (2M-1) x (2N-1) grid: node (r, c) sits at grid position
// (2r, 2c) and every other position holds a configuration switch. Each
// position is linked to its four grid neighbours, so routers never touch each
// other: two adjacent routers are joined through the switch between them
// (two channel segments make one conventional channel), and the switches
// between them can also be chained into long links between distant routers,
// which is how application-specific topologies (trees, direct links) are
// formed over the regular grid. Grid positions are numbered y*(2N-1)+x; node
// (r, c) is number r*N+c. This layout follows the document's description of
// routers joined only through switch boxes and its numbering of nets in the
// 4 x 4 example.
//
// Configuration: the host writes words over the cfg_* bus, addressed by grid
// position. A switch takes {alternate, primary} 8-bit words in cfg_data; a
// router takes the 6-bit {alternate, primary} candidate pair for destination
// cfg_idx. Each element stores NAPP applications; app_req/app_next asks the
// configuration manager to change application, which it does once the
// network has drained.
//
// fault marks an outgoing sub-link of a switch as damaged (for test, or from
// a link monitor), making the switch take its pre-configured detour. The
// ev_* outputs pulse on back-tracking events. The combinational switch
// datapath forms structural loops around every router on the grid; see
// cfg_switch for why those warnings stand.
module noc_top
  import noc_pkg::*;
#(
  parameter int unsigned M       = 4,
  parameter int unsigned N       = 4,
  parameter int unsigned NAPP    = 2,
  parameter int unsigned BACKOFF = 4,
  parameter int unsigned AW      = (NAPP > 1) ? $clog2(NAPP) : 1,
  parameter int unsigned NODES   = M * N,
  parameter int unsigned GH      = 2 * M - 1,
  parameter int unsigned GW      = 2 * N - 1,
  parameter int unsigned NPOS    = GH * GW
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // configuration bus and application switching
  input  logic                     cfg_we,
  input  logic [7:0]               cfg_pos,
  input  logic [AW-1:0]            cfg_app,
  input  logic [NODE_W-1:0]        cfg_idx,
  input  logic [15:0]              cfg_data,
  input  logic                     app_req,
  input  logic [AW-1:0]            app_next,
  output logic [AW-1:0]            app_sel,
  output logic                     app_done,
  output logic [15:0]              switch_cycles,
  // IP core side of every node's wrapper
  input  logic [NODES-1:0]         tx_start,
  input  logic [NODE_W-1:0]        tx_dest [NODES],
  input  logic [15:0]              tx_len  [NODES],
  input  logic [DW_DEF-1:0]        tx_data [NODES],
  output logic [NODES-1:0]         tx_pop,
  output logic [NODES-1:0]         tx_busy,
  output logic [NODES-1:0]         tx_done,
  input  logic [NODES-1:0]         rx_ready,
  output logic [NODES-1:0]         rx_vld,
  output logic [DW_DEF-1:0]        rx_data [NODES],
  output logic [NODES-1:0]         rx_done,
  // damaged sub-links and event pulses
  input  logic [NPOS-1:0][3:0]     fault,
  output logic [NPOS-1:0]          ev_sw_alt,
  output logic [NPOS-1:0]          ev_sw_nack,
  output logic [NODES-1:0]         ev_rt_bt,
  output logic [NODES-1:0]         ev_retry
);

  // Signals leaving each grid position through each of its four ports.
  fwd_t fwd_o [GH][GW][4];
  bwd_t bwd_o [GH][GW][4];

  logic              c_we;
  logic [7:0]        c_pos;
  logic [AW-1:0]     c_app;
  logic [NODE_W-1:0] c_idx;
  logic [15:0]       c_data;
  logic              hold;
  logic [NODES-1:0]  rt_busy, ni_busy;

  cfg_manager #(.NAPP(NAPP)) u_mgr (
    .clk, .rst_n, .app_req, .app_next,
    .net_busy(|{rt_busy, ni_busy}),
    .app_sel, .hold, .app_done, .switch_cycles,
    .h_we(cfg_we), .h_pos(cfg_pos), .h_app(cfg_app), .h_idx(cfg_idx), .h_data(cfg_data),
    .c_we, .c_pos, .c_app, .c_idx, .c_data
  );

  for (genvar y = 0; y < GH; y++) begin : g_row
    for (genvar x = 0; x < GW; x++) begin : g_col
      localparam int unsigned POS = y * GW + x;
      fwd_t fwd_i [4];
      bwd_t bwd_i [4];

      // Gather what the four neighbours send towards this position.
      if (y > 0) begin : g_n
        assign fwd_i[0] = fwd_o[y-1][x][2];
        assign bwd_i[0] = bwd_o[y-1][x][2];
      end else begin : g_n0
        assign fwd_i[0] = '0;
        assign bwd_i[0] = '0;
      end
      if (x < GW - 1) begin : g_e
        assign fwd_i[1] = fwd_o[y][x+1][3];
        assign bwd_i[1] = bwd_o[y][x+1][3];
      end else begin : g_e0
        assign fwd_i[1] = '0;
        assign bwd_i[1] = '0;
      end
      if (y < GH - 1) begin : g_s
        assign fwd_i[2] = fwd_o[y+1][x][0];
        assign bwd_i[2] = bwd_o[y+1][x][0];
      end else begin : g_s0
        assign fwd_i[2] = '0;
        assign bwd_i[2] = '0;
      end
      if (x > 0) begin : g_w
        assign fwd_i[3] = fwd_o[y][x-1][1];
        assign bwd_i[3] = bwd_o[y][x-1][1];
      end else begin : g_w0
        assign fwd_i[3] = '0;
        assign bwd_i[3] = '0;
      end

      if ((y % 2 == 0) && (x % 2 == 0)) begin : g_node
        localparam int unsigned ID = (y / 2) * N + (x / 2);
        fwd_t r_fwd_i [5], r_fwd_o [5];
        bwd_t r_bwd_i [5], r_bwd_o [5];

        for (genvar d = 0; d < 4; d++) begin : g_p
          assign r_fwd_i[d]     = fwd_i[d];
          assign r_bwd_i[d]     = bwd_i[d];
          assign fwd_o[y][x][d] = r_fwd_o[d];
          assign bwd_o[y][x][d] = r_bwd_o[d];
        end

        bt_router #(.NAPP(NAPP), .NODES(NODES), .MY_ID(ID)) u_rt (
          .clk, .rst_n, .app_sel,
          .cfg_we(c_we && c_pos == 8'(POS)), .cfg_app(c_app), .cfg_idx(c_idx),
          .cfg_route(c_data[5:0]),
          .i_fwd(r_fwd_i), .o_bwd(r_bwd_o), .o_fwd(r_fwd_o), .i_bwd(r_bwd_i),
          .busy(rt_busy[ID]), .ev_bt(ev_rt_bt[ID])
        );

        ni_wrapper #(.BACKOFF(BACKOFF), .LEN_W(16)) u_ni (
          .clk, .rst_n, .hold,
          .tx_start(tx_start[ID]), .tx_dest(tx_dest[ID]), .tx_len(tx_len[ID]),
          .tx_data(tx_data[ID]), .tx_pop(tx_pop[ID]), .tx_busy(tx_busy[ID]),
          .tx_done(tx_done[ID]), .ev_retry(ev_retry[ID]),
          .rx_ready(rx_ready[ID]), .rx_vld(rx_vld[ID]), .rx_data(rx_data[ID]),
          .rx_done(rx_done[ID]),
          .o_fwd(r_fwd_i[4]), .i_bwd(r_bwd_o[4]), .i_fwd(r_fwd_o[4]), .o_bwd(r_bwd_i[4]),
          .busy(ni_busy[ID])
        );

        assign ev_sw_alt[POS]  = 1'b0;
        assign ev_sw_nack[POS] = 1'b0;
      end else begin : g_sw
        fwd_t s_fwd_o [4];
        bwd_t s_bwd_o [4];

        cfg_switch #(.NAPP(NAPP)) u_sw (
          .clk, .rst_n, .app_sel,
          .cfg_we(c_we && c_pos == 8'(POS)), .cfg_app(c_app),
          .cfg_prim(c_data[7:0]), .cfg_alt(c_data[15:8]),
          .i_fwd(fwd_i), .o_bwd(s_bwd_o), .o_fwd(s_fwd_o), .i_bwd(bwd_i),
          .fault(fault[POS]), .ev_alt(ev_sw_alt[POS]), .ev_nack(ev_sw_nack[POS])
        );

        for (genvar d = 0; d < 4; d++) begin : g_p
          assign fwd_o[y][x][d] = s_fwd_o[d];
          assign bwd_o[y][x][d] = s_bwd_o[d];
        end
      end
    end
  end

endmodule
