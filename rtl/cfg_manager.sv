// cfg_manager: configuration manager of the reconfigurable NoC.
//
// Every switch and router keeps the configuration of each application; the
// manager decides which one is in use. An application switch is requested
// with app_req and the new number app_next. The manager raises hold, which
// stops the wrappers from starting new paths, waits until the network has no
// path set up or held (net_busy low for two clocks in a row), changes app_sel
// and drops hold, pulsing app_done. switch_cycles holds the duration of the
// last switch. It also registers the configuration bus from the host once,
// so that loading stays off the network's critical paths.
//
// The document places the manager in the application layer and only says
// that it starts reconfiguration when applications switch; waiting for the
// network to drain and the hold signal are this design's own.
module cfg_manager
  import noc_pkg::*;
#(
  parameter int unsigned NAPP = 2,
  parameter int unsigned AW   = (NAPP > 1) ? $clog2(NAPP) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              app_req,
  input  logic [AW-1:0]     app_next,
  input  logic              net_busy,
  output logic [AW-1:0]     app_sel,
  output logic              hold,
  output logic              app_done,
  output logic [15:0]       switch_cycles,
  // configuration bus, host side and network side
  input  logic              h_we,
  input  logic [7:0]        h_pos,
  input  logic [AW-1:0]     h_app,
  input  logic [NODE_W-1:0] h_idx,
  input  logic [15:0]       h_data,
  output logic              c_we,
  output logic [7:0]        c_pos,
  output logic [AW-1:0]     c_app,
  output logic [NODE_W-1:0] c_idx,
  output logic [15:0]       c_data
);

  typedef enum logic [1:0] {M_RUN, M_DRAIN, M_QUIET} st_e;

  st_e         st_q;
  logic [AW-1:0] next_q;
  logic [15:0] cyc_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st_q <= M_RUN; next_q <= '0; app_sel <= '0; app_done <= 1'b0;
      cyc_q <= '0; switch_cycles <= '0;
      c_we <= 1'b0; c_pos <= '0; c_app <= '0; c_idx <= '0; c_data <= '0;
    end else begin
      app_done <= 1'b0;
      c_we <= h_we; c_pos <= h_pos; c_app <= h_app; c_idx <= h_idx; c_data <= h_data;
      if (st_q != M_RUN && cyc_q != '1) cyc_q <= cyc_q + 1'b1;
      case (st_q)
        M_RUN: if (app_req) begin
          next_q <= app_next;
          cyc_q  <= '0;
          st_q   <= M_DRAIN;
        end
        M_DRAIN: if (!net_busy) st_q <= M_QUIET;
        M_QUIET: if (net_busy) st_q <= M_DRAIN;
          else begin
            app_sel       <= next_q;
            app_done      <= 1'b1;
            switch_cycles <= cyc_q + 1'b1;
            st_q          <= M_RUN;
          end
        default: st_q <= M_RUN;
      endcase
    end
  end

  assign hold = (st_q != M_RUN);

endmodule
