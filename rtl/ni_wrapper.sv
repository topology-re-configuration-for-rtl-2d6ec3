// ni_wrapper: wrapper (network interface) between an IP core and the local
// port of its router.
//
// Source side: the core asks for a transfer of tx_len words to node tx_dest
// with a tx_start pulse. The wrapper raises a probe carrying the
// destination and waits. On ACK the path is set up and it streams the words,
// one per clock, taking each from tx_data and pulsing tx_pop; then it drops
// req to tear the path down and pulses tx_done once the ACK has gone. On
// NACK (every alternative was blocked) it drops req, waits BACKOFF clocks and
// probes again, pulsing ev_retry. While hold is high (the configuration
// manager is changing the network's configuration) no new probe is sent.
//
// Sink side: a probe that reaches this node is answered with ACK when
// rx_ready is high, else with NACK. Data words of the open path appear on
// rx_vld/rx_data; rx_done pulses when the sender closes the path.
//
// The document gives only the wrapper's place between core and switch and
// the probe/ACK/transmission phases; the core-side interface, the back-off
// retry and the hold input are this design's own. ACK/NACK and req leave from
// state registers or straight from the core's data; busy tells the manager
// whether this node has a path on the network. Assertions at the end check
// the handshake rules on the local port.
module ni_wrapper
  import noc_pkg::*;
#(
  parameter int unsigned BACKOFF = 4,
  parameter int unsigned LEN_W   = 16
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              hold,
  // core, source side
  input  logic              tx_start,
  input  logic [NODE_W-1:0] tx_dest,
  input  logic [LEN_W-1:0]  tx_len,     // words, at least 1
  input  logic [DW_DEF-1:0] tx_data,
  output logic              tx_pop,
  output logic              tx_busy,
  output logic              tx_done,
  output logic              ev_retry,
  // core, sink side
  input  logic              rx_ready,
  output logic              rx_vld,
  output logic [DW_DEF-1:0] rx_data,
  output logic              rx_done,
  // router local port
  output fwd_t              o_fwd,
  input  bwd_t              i_bwd,
  input  fwd_t              i_fwd,
  output bwd_t              o_bwd,
  output logic              busy
);

  typedef enum logic [2:0] {T_IDLE, T_WAIT, T_PROBE, T_SEND, T_CLOSE, T_BACK} tst_e;
  typedef enum logic [1:0] {X_IDLE, X_CONN, X_NACK} rst_e;

  localparam int unsigned BW = $clog2(BACKOFF + 2);

  tst_e              ts_q;
  rst_e              rs_q;
  logic [NODE_W-1:0] dest_q;
  logic [LEN_W-1:0]  len_q, cnt_q;
  logic [BW-1:0]     bo_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ts_q <= T_IDLE; rs_q <= X_IDLE;
      dest_q <= '0; len_q <= '0; cnt_q <= '0; bo_q <= '0;
    end else begin
      case (ts_q)
        T_IDLE: if (tx_start) begin
          dest_q <= tx_dest;
          len_q  <= (tx_len == '0) ? LEN_W'(1) : tx_len;
          ts_q   <= T_WAIT;
        end
        T_WAIT:  if (!hold) ts_q <= T_PROBE;
        T_PROBE: if (i_bwd.ack) begin
          cnt_q <= '0;
          ts_q  <= T_SEND;
        end else if (i_bwd.nack) begin
          bo_q <= '0;
          ts_q <= T_BACK;
        end
        T_SEND: begin
          cnt_q <= cnt_q + 1'b1;
          if (cnt_q == len_q - 1'b1) ts_q <= T_CLOSE;
        end
        T_CLOSE: if (!i_bwd.ack) ts_q <= T_IDLE;
        T_BACK: begin
          if (32'(bo_q) < BACKOFF) bo_q <= bo_q + 1'b1;
          else if (!i_bwd.nack && !hold) ts_q <= T_PROBE;
        end
        default: ts_q <= T_IDLE;
      endcase
      case (rs_q)
        X_IDLE: if (i_fwd.req) rs_q <= rx_ready ? X_CONN : X_NACK;
        default: if (!i_fwd.req) rs_q <= X_IDLE;
      endcase
    end
  end

  always_comb begin
    o_fwd = '0;
    if (ts_q == T_PROBE) begin
      o_fwd.req = 1'b1;
      o_fwd.data[NODE_W-1:0] = dest_q;
    end else if (ts_q == T_SEND) begin
      o_fwd.req  = 1'b1;
      o_fwd.vld  = 1'b1;
      o_fwd.data = tx_data;
    end
    tx_pop   = (ts_q == T_SEND);
    tx_busy  = (ts_q != T_IDLE);
    tx_done  = (ts_q == T_CLOSE) && !i_bwd.ack;
    ev_retry = (ts_q == T_PROBE) && i_bwd.nack && !i_bwd.ack;
    o_bwd.ack  = (rs_q == X_CONN);
    o_bwd.nack = (rs_q == X_NACK);
    rx_vld   = (rs_q == X_CONN) && i_fwd.req && i_fwd.vld;
    rx_data  = i_fwd.data;
    rx_done  = (rs_q == X_CONN) && !i_fwd.req;
    busy     = (ts_q == T_PROBE) || (ts_q == T_SEND) || (ts_q == T_CLOSE)
               || (ts_q == T_BACK && i_bwd.nack) || (rs_q != X_IDLE) || i_fwd.req;
  end

  // Handshake rules seen from this node's side of the local port.
  // A hop never answers ACK and NACK at once.
  a_bwd_excl: assert property (@(posedge clk) disable iff (!rst_n)
                               !(i_bwd.ack && i_bwd.nack));
  // Once ACKed, the path stays acknowledged while this source sends.
  a_ack_held: assert property (@(posedge clk) disable iff (!rst_n)
                               (ts_q == T_SEND) |-> i_bwd.ack);
  // Words only move on an acknowledged path.
  a_rx_conn:  assert property (@(posedge clk) disable iff (!rst_n)
                               (i_fwd.req && i_fwd.vld) |-> (rs_q == X_CONN));

endmodule
