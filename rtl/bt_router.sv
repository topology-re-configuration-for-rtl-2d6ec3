// bt_router: five-port circuit-switching router with back-tracking path
// set-up.
//
// Ports 0..3 (N, E, S, W) attach to configuration switches, port 4 to the
// node's wrapper. A path is set up by a probe (req high, destination number
// in data[NODE_W-1:0]). The router looks the destination up in a routing
// table of the current application, which gives a primary and an alternate
// output; a probe for this node goes to port 4. The probe is forwarded on the
// first candidate that is free. If that output is in use, or the path behind
// it answers NACK, the router releases it and tries the next candidate
// instead of waiting; when no candidate is left it answers NACK upstream,
// so the probe back-tracks one more hop. An ACK from the destination is
// passed back to the source and the path stays reserved until the source
// drops req. Because a probe never waits on a busy resource, no cycle of
// waiting paths can form (no deadlock); the source's bounded back-off
// retries keep it live.
//
// The probing, back-tracking, ACK and five-port organisation follow the
// document; the table-based choice of candidates (two per destination), the
// fixed lowest-port-first arbitration and the register stages are this
// design's own.
//
// Timing: forward data and req are registered once per router; ACK and NACK
// leave from state registers. A probe advances one router per clock plus the
// switch set-up clock; data then flows at one word per clock.
//
// Configuration: cfg_we writes the {alternate, primary} candidate pair
// (3-bit rport_e codes) for destination cfg_idx of application cfg_app.
module bt_router
  import noc_pkg::*;
#(
  parameter int unsigned NAPP  = 2,
  parameter int unsigned NODES = 16,
  parameter int unsigned MY_ID = 0,
  parameter int unsigned AW    = (NAPP > 1) ? $clog2(NAPP) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [AW-1:0]     app_sel,
  input  logic              cfg_we,
  input  logic [AW-1:0]     cfg_app,
  input  logic [NODE_W-1:0] cfg_idx,
  input  logic [5:0]        cfg_route,   // {alternate, primary}
  input  fwd_t              i_fwd [5],
  output bwd_t              o_bwd [5],
  output fwd_t              o_fwd [5],
  input  bwd_t              i_bwd [5],
  output logic              busy,        // some path is being set up or held
  output logic              ev_bt        // a NACK made the router try again or back-track
);

  localparam int unsigned NW = (NODES > 1) ? $clog2(NODES) : 1;

  typedef enum logic [2:0] {R_IDLE, R_TRY, R_WAIT, R_CONN, R_NACK} st_e;

  logic [5:0]  tbl_q [NAPP][NODES];

  st_e         st_q  [5], st_n  [5];
  logic [2:0]  c0_q  [5], c0_n  [5];   // candidates of the probe held at input i
  logic [2:0]  c1_q  [5], c1_n  [5];
  logic        k_q   [5], k_n   [5];   // candidate in use
  logic [2:0]  cur_q [5], cur_n [5];
  logic        own_v_q [5], own_v_n [5];
  logic [2:0]  own_i_q [5], own_i_n [5];
  fwd_t        fwd_q [5];
  logic        ev_n;

  function automatic logic valid_port(input logic [2:0] p);
    return p <= 3'd4;
  endfunction

  always_comb begin
    logic [4:0]        claim;
    logic [NODE_W-1:0] dst;
    logic [5:0]        ent;
    logic              done;
    logic [2:0]        c;
    claim = '0;
    c     = '0;
    ev_n  = 1'b0;
    for (int o = 0; o < 5; o++) begin
      own_v_n[o] = own_v_q[o];
      own_i_n[o] = own_i_q[o];
    end
    for (int i = 0; i < 5; i++) begin
      st_n[i] = st_q[i]; c0_n[i] = c0_q[i]; c1_n[i] = c1_q[i];
      k_n[i]  = k_q[i];  cur_n[i] = cur_q[i];
      dst  = i_fwd[i].data[NODE_W-1:0];
      ent  = '1;
      done = 1'b0;
      case (st_q[i])
        R_IDLE: if (i_fwd[i].req) begin
          if (32'(dst) == MY_ID) begin
            c0_n[i] = 3'(RP_L); c1_n[i] = 3'(RP_NONE);
          end else begin
            if (32'(app_sel) < NAPP && 32'(dst) < NODES) ent = tbl_q[app_sel][dst[NW-1:0]];
            c0_n[i] = ent[2:0]; c1_n[i] = ent[5:3];
          end
          k_n[i]  = 1'b0;
          st_n[i] = R_TRY;
        end
        R_WAIT: begin
          if (!i_fwd[i].req) begin
            own_v_n[cur_q[i]] = 1'b0;
            st_n[i] = R_IDLE;
          end else if (i_bwd[cur_q[i]].ack) begin
            st_n[i] = R_CONN;
          end else if (i_bwd[cur_q[i]].nack) begin
            own_v_n[cur_q[i]] = 1'b0;
            ev_n = 1'b1;
            if (!k_q[i]) begin
              k_n[i]  = 1'b1;
              st_n[i] = R_TRY;
            end else st_n[i] = R_NACK;
          end
        end
        R_CONN: if (!i_fwd[i].req) begin
          own_v_n[cur_q[i]] = 1'b0;
          st_n[i] = R_IDLE;
        end
        R_NACK: if (!i_fwd[i].req) st_n[i] = R_IDLE;
        default: ;  // R_TRY below
      endcase
      if (st_q[i] == R_TRY) begin
        if (!i_fwd[i].req) st_n[i] = R_IDLE;
        else begin
          for (int k = 0; k < 2; k++) begin
            c = (k == 0) ? c0_q[i] : c1_q[i];
            if (!done && (k >= int'(k_q[i])) && valid_port(c) && 32'(c) != i
                && !(k == 1 && c == c0_q[i])
                && !own_v_q[c] && !claim[c] && !i_bwd[c].ack && !i_bwd[c].nack) begin
              claim[c]   = 1'b1;
              own_v_n[c] = 1'b1;
              own_i_n[c] = 3'(i);
              cur_n[i]   = c;
              k_n[i]     = (k == 1);
              st_n[i]    = R_WAIT;
              done       = 1'b1;
            end
          end
          if (!done) st_n[i] = R_NACK;
        end
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int a = 0; a < NAPP; a++)
        for (int d = 0; d < NODES; d++) tbl_q[a][d] <= '1;
      for (int i = 0; i < 5; i++) begin
        st_q[i] <= R_IDLE; c0_q[i] <= 3'(RP_NONE); c1_q[i] <= 3'(RP_NONE);
        k_q[i] <= 1'b0; cur_q[i] <= '0;
        own_v_q[i] <= 1'b0; own_i_q[i] <= '0;
        fwd_q[i] <= '0;
      end
      ev_bt <= 1'b0;
    end else begin
      if (cfg_we && 32'(cfg_app) < NAPP && 32'(cfg_idx) < NODES)
        tbl_q[cfg_app][cfg_idx[NW-1:0]] <= cfg_route;
      for (int i = 0; i < 5; i++) begin
        st_q[i] <= st_n[i]; c0_q[i] <= c0_n[i]; c1_q[i] <= c1_n[i];
        k_q[i] <= k_n[i]; cur_q[i] <= cur_n[i];
        own_v_q[i] <= own_v_n[i]; own_i_q[i] <= own_i_n[i];
        fwd_q[i] <= own_v_n[i] ? i_fwd[own_i_n[i]] : '0;
      end
      ev_bt <= ev_n;
    end
  end

  always_comb begin
    busy = 1'b0;
    for (int i = 0; i < 5; i++) begin
      o_fwd[i]      = fwd_q[i];
      o_bwd[i].ack  = (st_q[i] == R_CONN);
      o_bwd[i].nack = (st_q[i] == R_NACK);
      if (st_q[i] != R_IDLE) busy = 1'b1;
    end
  end

endmodule
