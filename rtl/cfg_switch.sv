// cfg_switch: configuration switch of the reconfigurable NoC.
//
// The switch sits on the routing grid between routers and has four
// bidirectional ports N, E, S, W. Every link is two independent one-way
// sub-links, and each outgoing sub-link is driven by a 3:1 multiplexer of the
// three other incoming sub-links, so the switch is four multiplexers set by
// an 8-bit word: bits [2o+1:2o] give the input port for output o (N=0, E=1,
// S=2, W=3); a field naming the output's own port switches it off. This
// structure, the 8-bit word and the storage of one word per application
// follow the document.
//
// Back-tracking: besides the primary word every application has an
// alternate word that describes a pre-configured detour. An incoming probe
// takes the output its primary word gives it. If that output is damaged
// (fault), or in use, or the path behind it answers NACK, the switch drops
// the probe there and reconnects the same input to the output the alternate
// word gives it; when that also fails it answers NACK itself so the node
// upstream can back-track further. An input that has no primary output but
// has an alternate one (a switch that only lies on a detour) uses the
// alternate. This small per-input state machine and the output ownership
// registers are this design's reading of "an alternate route which is
// pre-configured within the switch"; the document gives no circuit for it.
//
// Timing: data and ACK pass through the switch without a register, as
// through the document's transistor switches; taking or changing a
// connection costs one clock. Because the datapath is combinational, a ring
// of switches is a structural combinational loop of the whole network; a
// valid configuration never closes such a ring and unused outputs are
// switched off, so the loop warnings a linter reports on the assembled
// network stand.
//
// Configuration: cfg_we writes {alternate, primary} for application cfg_app;
// app_sel chooses the word in use. Reset sets every output off.
module cfg_switch
  import noc_pkg::*;
#(
  parameter int unsigned NAPP = 2,                      // applications stored
  parameter int unsigned AW   = (NAPP > 1) ? $clog2(NAPP) : 1
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic [AW-1:0]                app_sel,
  input  logic                         cfg_we,
  input  logic [AW-1:0]                cfg_app,
  input  logic [7:0]                   cfg_prim,
  input  logic [7:0]                   cfg_alt,
  input  fwd_t                         i_fwd [4],  // incoming sub-link, per port
  output bwd_t                         o_bwd [4],  // its ACK/NACK back to the sender
  output fwd_t                         o_fwd [4],  // outgoing sub-link, per port
  input  bwd_t                         i_bwd [4],  // its ACK/NACK from the receiver
  input  logic [3:0]                   fault,      // outgoing sub-link is damaged
  output logic                         ev_alt,     // a probe moved onto its detour
  output logic                         ev_nack     // a probe was sent back (NACK)
);

  localparam logic [7:0] ALL_OFF = 8'b11_10_01_00;

  typedef enum logic [1:0] {S_IDLE, S_USE, S_NACK} st_e;

  logic [7:0] prim_q [NAPP];
  logic [7:0] alt_q  [NAPP];
  logic [7:0] prim, alt;

  st_e        st_q   [4], st_n   [4];
  logic [1:0] cur_q  [4], cur_n  [4];
  logic       onalt_q[4], onalt_n[4];
  logic       own_v_q[4], own_v_n[4];
  logic [1:0] own_i_q[4], own_i_n[4];

  // Primary and alternate output of every input, decoded from the words.
  logic       has_p [4], has_a [4];
  logic [1:0] p_out [4], a_out [4];

  assign prim = (32'(app_sel) < NAPP) ? prim_q[app_sel] : ALL_OFF;
  assign alt  = (32'(app_sel) < NAPP) ? alt_q[app_sel]  : ALL_OFF;

  always_comb begin
    for (int i = 0; i < 4; i++) begin
      has_p[i] = 1'b0; p_out[i] = 2'd0;
      has_a[i] = 1'b0; a_out[i] = 2'd0;
      for (int o = 3; o >= 0; o--) begin
        if (o != i && prim[2*o +: 2] == 2'(i)) begin has_p[i] = 1'b1; p_out[i] = 2'(o); end
        if (o != i && alt[2*o +: 2]  == 2'(i)) begin has_a[i] = 1'b1; a_out[i] = 2'(o); end
      end
    end
  end

  // Per-input connection state and output ownership.
  always_comb begin
    logic [3:0] claim;
    logic       fr;
    claim   = '0;
    ev_alt  = 1'b0;
    ev_nack = 1'b0;
    for (int o = 0; o < 4; o++) begin
      own_v_n[o] = own_v_q[o];
      own_i_n[o] = own_i_q[o];
    end
    for (int i = 0; i < 4; i++) begin
      st_n[i]    = st_q[i];
      cur_n[i]   = cur_q[i];
      onalt_n[i] = onalt_q[i];
      case (st_q[i])
        S_IDLE: if (i_fwd[i].req) begin
          fr = has_p[i] && !own_v_q[p_out[i]] && !claim[p_out[i]] && !fault[p_out[i]]
               && !i_bwd[p_out[i]].ack && !i_bwd[p_out[i]].nack;
          if (fr) begin
            claim[p_out[i]] = 1'b1;
            own_v_n[p_out[i]] = 1'b1; own_i_n[p_out[i]] = 2'(i);
            cur_n[i] = p_out[i]; onalt_n[i] = 1'b0; st_n[i] = S_USE;
          end else if (has_a[i] && !own_v_q[a_out[i]] && !claim[a_out[i]] && !fault[a_out[i]]
                       && !i_bwd[a_out[i]].ack && !i_bwd[a_out[i]].nack) begin
            claim[a_out[i]] = 1'b1;
            own_v_n[a_out[i]] = 1'b1; own_i_n[a_out[i]] = 2'(i);
            cur_n[i] = a_out[i]; onalt_n[i] = 1'b1; st_n[i] = S_USE;
            if (has_p[i]) ev_alt = 1'b1;
          end else begin
            st_n[i] = S_NACK;
            ev_nack = 1'b1;
          end
        end
        S_USE: begin
          if (!i_fwd[i].req) begin
            own_v_n[cur_q[i]] = 1'b0;
            st_n[i] = S_IDLE;
          end else if (i_bwd[cur_q[i]].nack || fault[cur_q[i]]) begin
            own_v_n[cur_q[i]] = 1'b0;
            if (!onalt_q[i] && has_a[i] && a_out[i] != cur_q[i]
                && !own_v_q[a_out[i]] && !claim[a_out[i]] && !fault[a_out[i]]
                && !i_bwd[a_out[i]].ack && !i_bwd[a_out[i]].nack) begin
              claim[a_out[i]] = 1'b1;
              own_v_n[a_out[i]] = 1'b1; own_i_n[a_out[i]] = 2'(i);
              cur_n[i] = a_out[i]; onalt_n[i] = 1'b1;
              ev_alt = 1'b1;
            end else begin
              st_n[i] = S_NACK;
              ev_nack = 1'b1;
            end
          end
        end
        default: if (!i_fwd[i].req) st_n[i] = S_IDLE;  // S_NACK
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int a = 0; a < NAPP; a++) begin
        prim_q[a] <= ALL_OFF;
        alt_q[a]  <= ALL_OFF;
      end
      for (int i = 0; i < 4; i++) begin
        st_q[i] <= S_IDLE; cur_q[i] <= '0; onalt_q[i] <= 1'b0;
        own_v_q[i] <= 1'b0; own_i_q[i] <= '0;
      end
    end else begin
      if (cfg_we && 32'(cfg_app) < NAPP) begin
        prim_q[cfg_app] <= cfg_prim;
        alt_q[cfg_app]  <= cfg_alt;
      end
      for (int i = 0; i < 4; i++) begin
        st_q[i] <= st_n[i]; cur_q[i] <= cur_n[i]; onalt_q[i] <= onalt_n[i];
        own_v_q[i] <= own_v_n[i]; own_i_q[i] <= own_i_n[i];
      end
    end
  end

  // Multiplexers: forward data through the owning input, ACK back to it.
  // While reset is asserted every output is held off, so that no ring of
  // switches can carry a signal around before the registers are reset.
  always_comb begin
    for (int o = 0; o < 4; o++)
      o_fwd[o] = (rst_n && own_v_q[o]) ? i_fwd[own_i_q[o]] : '0;
    for (int i = 0; i < 4; i++) begin
      o_bwd[i] = '0;
      if (rst_n && st_q[i] == S_USE) o_bwd[i].ack = i_bwd[cur_q[i]].ack;
      if (rst_n && st_q[i] == S_NACK) o_bwd[i].nack = 1'b1;
    end
  end

endmodule
