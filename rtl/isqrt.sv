// isqrt - integer square root, one result bit per clock.
//
// root = floor(sqrt(rad)) for an IN_W-bit radicand (IN_W even). A pulse on
// start (while busy is low) loads rad; IN_W/2 clocks later done pulses for one
// cycle and root holds the result until the next start. It is the
// shift-and-subtract (digit-by-digit) method: each clock brings down two
// radicand bits and tries to subtract 4*root+1 from the partial remainder.
// The centroid block uses it to turn a fixed-point variance into an RMS width.
module isqrt #(
  parameter int IN_W = 32
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic [IN_W-1:0]   rad,
  output logic              busy,
  output logic              done,
  output logic [IN_W/2-1:0] root
);

  localparam int OUT_W = IN_W / 2;
  localparam int CNT_W = $clog2(OUT_W + 1);

  logic [IN_W-1:0]  rad_q;    // radicand bits still to bring down
  logic [OUT_W:0]   part;     // partial remainder, at most 2*res
  logic [OUT_W-1:0] res;
  logic [CNT_W-1:0] cnt;
  logic [OUT_W+2:0] trial;
  logic [OUT_W+2:0] sub;
  logic [OUT_W+3:0] diff;

  always_comb begin
    trial = {part, rad_q[IN_W-1 -: 2]};
    sub   = {1'b0, res, 2'b01};
    diff  = {1'b0, trial} - {1'b0, sub};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rad_q <= '0;
      part  <= '0;
      res   <= '0;
      cnt   <= '0;
      busy  <= 1'b0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        rad_q <= rad;
        part  <= '0;
        res   <= '0;
        cnt   <= CNT_W'(OUT_W);
        busy  <= 1'b1;
      end else if (busy) begin
        rad_q <= {rad_q[IN_W-3:0], 2'b00};
        if (!diff[OUT_W+3]) begin
          part <= diff[OUT_W:0];
          res  <= {res[OUT_W-2:0], 1'b1};
        end else begin
          part <= trial[OUT_W:0];
          res  <= {res[OUT_W-2:0], 1'b0};
        end
        cnt <= cnt - 1'b1;
        if (cnt == CNT_W'(1)) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

  assign root = res;

endmodule
