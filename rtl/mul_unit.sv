// Two-stage pipelined multiplier executing the "mul" multi-cycle instruction.
//
// Sign-detection array architecture: stage 1 detects the operand signs, takes
// the magnitudes and sums the partial-product matrix in two halves (rows
// 0..W/2-1 and W/2..W-1), registering both; stage 2 adds the halves, restores
// the sign, applies the fixed-point post-shift (arithmetic right shift by sh)
// and saturates to W bits.  The instruction takes two cycles: operands enter
// with start in cycle 1 and the result is valid (done=1) in cycle 2.
// The two-stage, two-cycle structure and the sign detection follow the
// processor description; the half/half split of the matrix, the post-shift
// and the saturation are this design's choices.
module mul_unit #(
  parameter int unsigned W = 16
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [W-1:0]  a,
  input  logic [W-1:0]  b,
  input  logic [4:0]    sh,
  output logic          done,
  output logic [W-1:0]  y
);
  localparam int unsigned H = W / 2;

  logic [W-1:0]   mag_a, mag_b;
  logic [2*W-1:0] lo_sum, hi_sum;
  logic [2*W-1:0] lo_q, hi_q;
  logic           neg_q;
  logic [4:0]     sh_q;
  logic           busy_q;

  // Stage 1: sign detection and partial-product matrix.
  always_comb begin
    mag_a  = a[W-1] ? W'(-a) : a;
    mag_b  = b[W-1] ? W'(-b) : b;
    lo_sum = '0;
    hi_sum = '0;
    for (int r = 0; r < W; r++) begin
      if (r < int'(H)) lo_sum = lo_sum + ((mag_b[r] ? (2*W)'(mag_a) : '0) << r);
      else             hi_sum = hi_sum + ((mag_b[r] ? (2*W)'(mag_a) : '0) << r);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      lo_q <= '0; hi_q <= '0; neg_q <= 1'b0; sh_q <= '0; busy_q <= 1'b0;
    end else begin
      busy_q <= start;
      if (start) begin
        lo_q  <= lo_sum;
        hi_q  <= hi_sum;
        neg_q <= a[W-1] ^ b[W-1];
        sh_q  <= sh;
      end
    end
  end

  // Stage 2: final addition, sign restore, shift and saturation.
  logic [2*W-1:0] mag_p;
  logic signed [2*W:0] prod, shifted;
  always_comb begin
    mag_p   = lo_q + hi_q;
    prod    = neg_q ? -$signed({1'b0, mag_p}) : $signed({1'b0, mag_p});
    shifted = prod >>> sh_q;
    if (shifted > $signed((2*W+1)'(2**(W-1) - 1)))
      y = {1'b0, {(W-1){1'b1}}};
    else if (shifted < -$signed((2*W+1)'(2**(W-1))))
      y = {1'b1, {(W-1){1'b0}}};
    else
      y = shifted[W-1:0];
    done = busy_q;
  end
endmodule
