// group_merge: joins the frame streams of one group of 16 channels.
//
// Triggered mode: for each event it passes channel 0's frames up to its end
// marker, then channel 1's, and so on; after channel N-1 it sends one end
// marker for the whole group. Untriggered mode: it passes frames round-robin,
// one frame per turn, from channels that have one.
// Streams are valid/ready with transfers in cycles where ce is high; the
// input ready signals depend on the output ready combinationally.
// On a switch into triggered mode the channel pointer restarts at channel 0,
// so the first event is not started in the middle of the group.
module group_merge
  import tdc_pkg::*;
#(
  parameter int N = 16
) (
  input  logic           clk,
  input  logic           rst,
  input  logic           ce,
  input  logic           triggered,
  input  logic [N-1:0] in_valid,
  input  item_t          in_item [N],
  output logic [N-1:0] in_ready,
  output logic           out_valid,
  output item_t          out_item,
  input  logic           out_ready
);
  timeunit 1ps; timeprecision 1fs;

  localparam int CW = $clog2(N);

  logic [CW-1:0] sel;
  logic          grp_end;     // all channels of this event done
  logic [CW-1:0] rr_next;     // untriggered: next channel with a frame
  logic          found;
  logic          trig_q;      // mode in the previous ce cycle

  always_comb begin
    in_ready  = '0;
    out_valid = 1'b0;
    out_item  = in_item[sel];
    rr_next   = sel;
    found     = 1'b0;
    if (triggered) begin
      if (grp_end) begin
        out_valid = 1'b1;
        out_item  = '{eoe: 1'b1, word: '0};
      end else if (in_valid[sel]) begin
        // data frames go out; the channel's end marker is only consumed
        out_valid    = !in_item[sel].eoe;
        in_ready[sel] = in_item[sel].eoe ? 1'b1 : out_ready;
      end
    end else begin
      found = 1'b0;
      for (int k = 0; k < N; k++) begin
        if (!found && in_valid[CW'(32'(sel) + k)]) begin
          rr_next = CW'(32'(sel) + k);
          found   = 1'b1;
        end
      end
      out_valid          = in_valid[rr_next];
      out_item           = in_item[rr_next];
      in_ready[rr_next]  = out_ready;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      sel     <= '0;
      grp_end <= 1'b0;
      trig_q  <= 1'b0;
    end else if (ce) begin
      trig_q <= triggered;
      if (triggered && !trig_q) begin
        // entering triggered mode: events start at channel 0
        sel     <= '0;
        grp_end <= 1'b0;
      end else if (triggered) begin
        if (grp_end) begin
          if (out_ready) grp_end <= 1'b0;
        end else if (in_valid[sel] && in_item[sel].eoe) begin
          sel <= sel + 1'b1;
          if (sel == CW'(N-1)) grp_end <= 1'b1;
        end
      end else begin
        if (in_valid[rr_next] && out_ready) sel <= rr_next + 1'b1;
        else                                sel <= rr_next;
        grp_end <= 1'b0;
      end
    end
  end
endmodule
