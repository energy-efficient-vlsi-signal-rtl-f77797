// param_est: band-of-interest parameter estimation from the binary decisions
// of one sensing pass, delivered in frequency order. Short runs of H0 inside a
// band (at most X consecutive misses) are bridged, so a signal with a few
// missed bins still counts as one band ("miss-detection tolerant" detection);
// of all bands found, the widest is reported.
//
// How it works: a run starts at the first H1; every later H1 extends it and
// clears the gap counter; an H0 increments the gap counter and the run ends
// when more than X H0s follow its last H1 (or at the end of the pass). The run
// is [start, last]; its width is last - start + 1 bins and twice its centre is
// start + last (kept doubled so the centre stays an integer). Bridged H0s are
// counted in gap_fills.
//
// Interface/timing: clr before a pass; in_valid/d/last_in per bin in order
// 0..N-1 (last_in on the final bin); done pulses one clock after the final
// bin with found, bw, start_bin, c2 and gap_fills valid until the next clr.
//
// Follows the text: bandwidth b and centre c estimated from the consecutive
// H1 decisions; missed detections inside a band tolerated. Own choices: the
// gap length X = 3, choosing the widest band, and the doubled-centre output.
module param_est #(
  parameter int KW = 13,
  parameter int X  = 3
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          clr,
  input  logic          in_valid,
  input  logic          d,
  input  logic          last_in,
  output logic          done,
  output logic          found,
  output logic [KW:0]   bw,
  output logic [KW-1:0] start_bin,
  output logic [KW:0]   c2,
  output logic [15:0]   gap_fills
);
  logic [KW-1:0] idx, rs, rl;
  logic          inrun;
  logic [3:0]    gap;

  // candidate run when it closes
  logic [KW:0]   cw;
  assign cw = {1'b0, rl} - {1'b0, rs} + 1'b1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      idx <= '0; rs <= '0; rl <= '0; inrun <= 1'b0; gap <= '0;
      done <= 1'b0; found <= 1'b0; bw <= '0; start_bin <= '0; c2 <= '0; gap_fills <= '0;
    end else if (clr) begin
      idx <= '0; inrun <= 1'b0; gap <= '0; done <= 1'b0;
      found <= 1'b0; bw <= '0; start_bin <= '0; c2 <= '0; gap_fills <= '0;
    end else begin
      done <= 1'b0;
      if (in_valid) begin
        idx <= idx + 1'b1;
        if (d) begin
          if (!inrun) begin inrun <= 1'b1; rs <= idx; end
          else gap_fills <= gap_fills + 16'(gap);
          rl  <= idx;
          gap <= '0;
        end else if (inrun) begin
          if (int'(gap) >= X) begin
            inrun <= 1'b0; gap <= '0;
            if (cw > bw) begin found <= 1'b1; bw <= cw; start_bin <= rs; c2 <= {1'b0, rs} + {1'b0, rl}; end
          end else gap <= gap + 1'b1;
        end
        if (last_in) begin
          done <= 1'b1; inrun <= 1'b0; gap <= '0; idx <= '0;
          // close a run that reaches the end of the pass
          if (d) begin
            if (!inrun && bw == '0) begin found <= 1'b1; bw <= 1; start_bin <= idx; c2 <= {1'b0, idx} + {1'b0, idx}; end
            else if (inrun && ({1'b0, idx} - {1'b0, rs} + 1'b1) > bw) begin
              found <= 1'b1; bw <= {1'b0, idx} - {1'b0, rs} + 1'b1; start_bin <= rs; c2 <= {1'b0, rs} + {1'b0, idx};
            end
          end else if (inrun && int'(gap) < X && cw > bw) begin
            found <= 1'b1; bw <= cw; start_bin <= rs; c2 <= {1'b0, rs} + {1'b0, rl};
          end
        end
      end
    end
  end
endmodule
