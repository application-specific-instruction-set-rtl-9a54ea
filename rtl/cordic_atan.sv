// CORDIC vectoring unit executing the "atan" multi-cycle instruction.
//
// Computes the angle of the vector (x, y) = (b, a), i.e. atan2(a, b), as a
// 16-bit binary angle where 2^16 is a full turn (so 0x4000 = +90 degrees and
// 0x8000 = 180 degrees).  A left-half-plane vector is first turned by 180
// degrees; then 14 shift-and-add vectoring iterations drive y towards zero while
// the angle register collects the elementary angles
//   ATAN_TAB[i] = round(atan(2^-i) / (2*pi) * 65536),  i = 0..13.
// Two iterations are done per clock, so the instruction takes seven cycles:
// the start cycle does iterations 0-1, the next six cycles do 2-13, and the
// result is valid (done=1) in the seventh cycle.  The x/y datapath is W+3+5
// bits wide: three integer bits hold the CORDIC gain without overflow and five
// guard bits keep small vectors (such as 12-bit ADC data) accurate.
// The 7-cycle latency and the atan name follow the processor description; the
// iteration count, angle format and two-iterations-per-cycle split are this
// design's choices.
module cordic_atan #(
  parameter int unsigned W = 16
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [W-1:0]  a,     // y component
  input  logic [W-1:0]  b,     // x component
  output logic          done,
  output logic [15:0]   y      // angle, binary angle units
);
  localparam int unsigned G    = 5;        // fractional guard bits
  localparam int unsigned IW   = W + 3 + G;
  localparam int unsigned NPAIR = 7;
  localparam logic [15:0] ATAN_TAB [0:13] = '{
    16'd8192, 16'd4836, 16'd2555, 16'd1297, 16'd651, 16'd326, 16'd163,
    16'd81,   16'd41,   16'd20,   16'd10,   16'd5,   16'd3,   16'd1};

  typedef struct packed {
    logic signed [IW-1:0] x;
    logic signed [IW-1:0] y;
    logic        [15:0]   z;
  } cstate_t;

  function automatic cstate_t iter(cstate_t s, int i);
    cstate_t r;
    if (!s.y[IW-1]) begin
      r.x = s.x + (s.y >>> i);
      r.y = s.y - (s.x >>> i);
      r.z = s.z + ATAN_TAB[i];
    end else begin
      r.x = s.x - (s.y >>> i);
      r.y = s.y + (s.x >>> i);
      r.z = s.z - ATAN_TAB[i];
    end
    return r;
  endfunction

  cstate_t pre, in_s, mid_s, out_s, st_q;
  logic [2:0] cnt_q;
  logic       busy_q;

  always_comb begin
    // Pre-rotation into the right half plane.
    if (b[W-1]) begin
      pre.x = -(IW'($signed(b)) <<< G);
      pre.y = -(IW'($signed(a)) <<< G);
      pre.z = 16'h8000;
    end else begin
      pre.x = IW'($signed(b)) <<< G;
      pre.y = IW'($signed(a)) <<< G;
      pre.z = 16'h0000;
    end
    in_s  = busy_q ? st_q : pre;
    mid_s = iter(in_s, 2 * int'(cnt_q));
    out_s = iter(mid_s, 2 * int'(cnt_q) + 1);
    done  = busy_q && cnt_q == 3'(NPAIR - 1);
    y     = out_s.z;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st_q <= '0; cnt_q <= '0; busy_q <= 1'b0;
    end else if (start && !busy_q) begin
      st_q <= out_s; cnt_q <= 3'd1; busy_q <= 1'b1;
    end else if (busy_q) begin
      if (done) begin
        busy_q <= 1'b0; cnt_q <= '0;
      end else begin
        st_q <= out_s; cnt_q <= cnt_q + 3'd1;
      end
    end
  end
endmodule
