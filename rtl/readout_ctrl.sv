// readout_ctrl: builds the 32-bit frame stream of one readout port.
//
// The port serves a set of channel groups (group_mask): one group each in
// four-port mode, all four on port 0 in single-port mode, where the 4-bit
// channel field needs a group separator frame in front of each group's data.
//
// Triggered mode, per event: header 1 {1000, event ID[15:0], BX ID[11:0]},
// optionally header 2 {1001, 10'b0, trigger time[17:0]}, then for each served
// group a separator {1011, 26'b0, group[1:0]} (single-port mode only) and the
// group's frames up to its end marker, then the trailer
// {1010, event ID[11:0], number of data frames[15:0]}. Event information is
// queued here when a trigger is accepted (`evt_push`); a port that serves no
// group drops it. Untriggered mode: data frames round-robin over the served
// groups, a separator whenever the group changes in single-port mode.
// Header, trailer and separator contents are this design's choice.
module readout_ctrl
  import tdc_pkg::*;
#(
  parameter int EQ_DEPTH = 8
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              ce,
  input  cfg_t              cfg,
  input  logic [NGROUP-1:0] group_mask,
  input  logic              evt_push,
  input  event_t            evt_in,
  output logic              evt_full,
  input  logic [NGROUP-1:0] g_valid,
  input  item_t             g_item [NGROUP],
  output logic [NGROUP-1:0] g_ready,
  output logic              out_valid,
  output logic [31:0]       out_word,
  input  logic              out_ready
);
  timeunit 1ps; timeprecision 1fs;

  localparam int QW = $clog2(EQ_DEPTH);
  localparam int GW = $clog2(NGROUP);

  typedef enum logic [2:0] {S_WAIT, S_HDR1, S_HDR2, S_SEP, S_DATA, S_TRAIL} state_t;

  // ---- event queue ----
  event_t        eq [EQ_DEPTH];
  logic [QW-1:0] eq_rp, eq_wp;
  logic [QW:0]   eq_cnt;
  logic          eq_pop;
  event_t        evt;

  assign evt_full = (eq_cnt == (QW+1)'(EQ_DEPTH));
  assign evt      = eq[eq_rp];

  always_ff @(posedge clk) begin
    if (rst) begin
      eq_rp  <= '0;
      eq_wp  <= '0;
      eq_cnt <= '0;
    end else if (ce) begin
      if (evt_push && !evt_full) begin
        eq[eq_wp] <= evt_in;
        eq_wp     <= (eq_wp == QW'(EQ_DEPTH-1)) ? '0 : eq_wp + 1'b1;
      end
      if (eq_pop) eq_rp <= (eq_rp == QW'(EQ_DEPTH-1)) ? '0 : eq_rp + 1'b1;
      eq_cnt <= eq_cnt + (QW+1)'(evt_push && !evt_full) - (QW+1)'(eq_pop);
    end
  end

  // ---- frame sequencing ----
  state_t        state;
  logic [GW-1:0] grp;          // group being read
  logic [GW-1:0] last_grp;     // untriggered: group of the last frame
  logic          last_ok;      // last_grp is meaningful
  logic [15:0]   nwords;
  logic [GW-1:0] first_g;      // lowest served group
  logic [GW-1:0] next_g;       // next served group after grp
  logic          has_next;
  logic [GW-1:0] rr_g;         // untriggered: served group with a frame
  logic          rr_found;

  always_comb begin
    first_g  = '0;
    for (int g = NGROUP-1; g >= 0; g--) if (group_mask[g]) first_g = GW'(g);
    next_g   = grp;
    has_next = 1'b0;
    for (int g = NGROUP-1; g >= 0; g--)
      if (group_mask[g] && g > 32'(grp)) begin
        next_g   = GW'(g);
        has_next = 1'b1;
      end
    rr_g     = grp;
    rr_found = 1'b0;
    for (int k = 0; k < NGROUP; k++)
      if (!rr_found && group_mask[GW'(32'(grp) + k)] && g_valid[GW'(32'(grp) + k)]) begin
        rr_g     = GW'(32'(grp) + k);
        rr_found = 1'b1;
      end
  end

  always_comb begin
    out_valid = 1'b0;
    out_word  = '0;
    g_ready   = '0;
    eq_pop    = 1'b0;
    if (cfg.triggered) begin
      case (state)
        S_WAIT:  eq_pop = ce && (eq_cnt != '0) && (group_mask == '0);
        S_HDR1: begin
          out_valid = 1'b1;
          out_word  = {T_HEADER1, evt.event_id, evt.bx_id};
        end
        S_HDR2: begin
          out_valid = 1'b1;
          out_word  = {T_HEADER2, 10'b0, evt.trig_time};
        end
        S_SEP: begin
          out_valid = 1'b1;
          out_word  = {T_SEPARATOR, 26'b0, 2'(grp)};
        end
        S_DATA: begin
          if (g_valid[grp]) begin
            out_valid    = !g_item[grp].eoe;
            out_word     = g_item[grp].word;
            g_ready[grp] = g_item[grp].eoe ? 1'b1 : out_ready;
          end
        end
        S_TRAIL: begin
          out_valid = 1'b1;
          out_word  = {T_TRAILER, evt.event_id[11:0], nwords};
          eq_pop    = ce && out_ready;
        end
        default: ;
      endcase
    end else if (rr_found) begin
      if (cfg.single_port && (!last_ok || rr_g != last_grp)) begin
        out_valid = 1'b1;
        out_word  = {T_SEPARATOR, 26'b0, 2'(rr_g)};
      end else begin
        out_valid     = 1'b1;
        out_word      = g_item[rr_g].word;
        g_ready[rr_g] = out_ready;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state    <= S_WAIT;
      grp      <= '0;
      last_grp <= '0;
      last_ok  <= 1'b0;
      nwords   <= '0;
    end else if (ce) begin
      if (!cfg.triggered) begin
        state <= S_WAIT;
        if (rr_found && out_ready) begin
          if (cfg.single_port && (!last_ok || rr_g != last_grp)) begin
            last_grp <= rr_g;
            last_ok  <= 1'b1;
          end else begin
            grp <= cfg.single_port ? rr_g : rr_g + 1'b1;
          end
        end
      end else begin
        case (state)
          S_WAIT: if (eq_cnt != '0 && group_mask != '0) begin
            state  <= S_HDR1;
            nwords <= '0;
            grp    <= first_g;
          end
          S_HDR1: if (out_ready) state <= cfg.two_headers ? S_HDR2 :
                                          cfg.single_port ? S_SEP : S_DATA;
          S_HDR2: if (out_ready) state <= cfg.single_port ? S_SEP : S_DATA;
          S_SEP:  if (out_ready) state <= S_DATA;
          S_DATA: if (g_valid[grp]) begin
            if (g_item[grp].eoe) begin
              if (has_next) begin
                grp   <= next_g;
                state <= cfg.single_port ? S_SEP : S_DATA;
              end else begin
                state <= S_TRAIL;
              end
            end else if (out_ready) begin
              nwords <= nwords + 1'b1;
            end
          end
          S_TRAIL: if (out_ready) state <= S_WAIT;
          default: state <= S_WAIT;
        endcase
      end
    end
  end
endmodule
