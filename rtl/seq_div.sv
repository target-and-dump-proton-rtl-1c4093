// seq_div - unsigned restoring divider, one quotient bit per clock.
//
// Computes quo = num / den and rem = num % den for NUM_W-bit numerator and
// DEN_W-bit denominator. A pulse on start (while busy is low) loads the
// operands; NUM_W clocks later done pulses for one cycle and quo/rem hold the
// result until the next start. Each clock shifts the next numerator bit into a
// DEN_W+1 bit partial remainder and subtracts the denominator when it fits.
// Division by zero returns an all-ones quotient and the numerator as remainder,
// as the restoring recurrence gives; callers that can see a zero denominator
// check for it themselves. Used by the frame statistics blocks, where a
// frame's result has a whole frame time to be ready, so a small serial
// divider is enough.
module seq_div #(
  parameter int NUM_W = 32,
  parameter int DEN_W = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic [NUM_W-1:0] num,
  input  logic [DEN_W-1:0] den,
  output logic             busy,
  output logic             done,
  output logic [NUM_W-1:0] quo,
  output logic [DEN_W-1:0] rem
);

  localparam int CNT_W = $clog2(NUM_W + 1);

  logic [DEN_W-1:0] part;     // partial remainder, below den
  logic [NUM_W-1:0] shreg;    // numerator bits still to shift in, then quotient
  logic [DEN_W-1:0] den_q;
  logic [CNT_W-1:0] cnt;
  logic [DEN_W:0]   trial;
  logic [DEN_W:0]   diff;

  always_comb begin
    trial = {part, shreg[NUM_W-1]};
    diff  = trial - {1'b0, den_q};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      part  <= '0;
      shreg <= '0;
      den_q <= '0;
      cnt   <= '0;
      busy  <= 1'b0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        part  <= '0;
        shreg <= num;
        den_q <= den;
        cnt   <= CNT_W'(NUM_W);
        busy  <= 1'b1;
      end else if (busy) begin
        if (!diff[DEN_W]) begin
          part  <= diff[DEN_W-1:0];
          shreg <= {shreg[NUM_W-2:0], 1'b1};
        end else begin
          part  <= trial[DEN_W-1:0];
          shreg <= {shreg[NUM_W-2:0], 1'b0};
        end
        cnt <= cnt - 1'b1;
        if (cnt == CNT_W'(1)) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

  assign quo = shreg;
  assign rem = part;

endmodule
