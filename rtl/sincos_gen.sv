// sincos_gen -- pipelined trigonometric function generator.
//
// Returns cos(theta) and sin(theta) for theta = 2*pi*angle/4096, the angle
// given in binary angle measure (12 bits per turn).  The symmetries about
// the 180, 90 and 45 degree axes reduce every angle to alpha in [0, pi/4]:
// angle[11:9] selects the octant, which decides whether sine and cosine are
// swapped and which signs they get, and the 9 low bits give alpha (counted
// back from the octant's end in odd octants).  alpha itself is split into a
// coarse part a (5 bits, 32 table points per octant) and a fine part b
// (4 bits).  The basic table holds the 32 sine/cosine pairs of a; 32
// interpolation constants, sin(b) and 1-cos(b) for the 16 values of b,
// complete the rotation
//     sin(a+b) = sin a + cos a * sin b - sin a * (1 - cos b)
//     cos(a+b) = cos a - sin a * sin b - cos a * (1 - cos b).
// Table entries: s_i = round(32768 sin(i*pi/128)), c_i = round(32768 cos(i*pi/128));
// constants: sb_r = round(2^20 sin(r*2*pi/4096)), omc_r = round(2^20 (1-cos(r*2*pi/4096))).
// The document gives the octant symmetry and the 32+32 table size; the split
// of the 32 constants into sin(b) and 1-cos(b) is this design's reading of it.
//
// Timing: a result appears 3 clocks after its angle (stage 1 table lookup,
// stage 2 products, stage 3 sums, rounding and octant mapping), one result
// per clock.  Outputs are 13-bit two's complement, 1.0 = 4096 saturated to 4095.
module sincos_gen
  import dfa_pkg::*;
(
  input  logic                 clk,
  input  logic [LOG2N_MAX-1:0] angle,
  output sample_t              cos_o,
  output sample_t              sin_o
);

  // ---- stage 1: octant reduction and table lookup
  logic [2:0]  oct;
  logic [9:0]  alpha;            // 0..512 units of 2*pi/4096
  logic [16:0] s, c;             // coarse sin/cos, Q15
  logic [15:0] sb, omc;          // fine constants, Q20

  always_comb begin
    oct   = angle[11:9];
    alpha = oct[0] ? (10'd512 - {1'b0, angle[8:0]}) : {1'b0, angle[8:0]};
  end

  // basic table, 32 points per octant
  always_comb begin
    unique case (alpha[8:4])
        5'd0: begin s = 17'd0; c = 17'd32768; end
        5'd1: begin s = 17'd804; c = 17'd32758; end
        5'd2: begin s = 17'd1608; c = 17'd32729; end
        5'd3: begin s = 17'd2411; c = 17'd32679; end
        5'd4: begin s = 17'd3212; c = 17'd32610; end
        5'd5: begin s = 17'd4011; c = 17'd32522; end
        5'd6: begin s = 17'd4808; c = 17'd32413; end
        5'd7: begin s = 17'd5602; c = 17'd32286; end
        5'd8: begin s = 17'd6393; c = 17'd32138; end
        5'd9: begin s = 17'd7180; c = 17'd31972; end
        5'd10: begin s = 17'd7962; c = 17'd31786; end
        5'd11: begin s = 17'd8740; c = 17'd31581; end
        5'd12: begin s = 17'd9512; c = 17'd31357; end
        5'd13: begin s = 17'd10279; c = 17'd31114; end
        5'd14: begin s = 17'd11039; c = 17'd30853; end
        5'd15: begin s = 17'd11793; c = 17'd30572; end
        5'd16: begin s = 17'd12540; c = 17'd30274; end
        5'd17: begin s = 17'd13279; c = 17'd29957; end
        5'd18: begin s = 17'd14010; c = 17'd29622; end
        5'd19: begin s = 17'd14733; c = 17'd29269; end
        5'd20: begin s = 17'd15447; c = 17'd28899; end
        5'd21: begin s = 17'd16151; c = 17'd28511; end
        5'd22: begin s = 17'd16846; c = 17'd28106; end
        5'd23: begin s = 17'd17531; c = 17'd27684; end
        5'd24: begin s = 17'd18205; c = 17'd27246; end
        5'd25: begin s = 17'd18868; c = 17'd26791; end
        5'd26: begin s = 17'd19520; c = 17'd26320; end
        5'd27: begin s = 17'd20160; c = 17'd25833; end
        5'd28: begin s = 17'd20788; c = 17'd25330; end
        5'd29: begin s = 17'd21403; c = 17'd24812; end
        5'd30: begin s = 17'd22006; c = 17'd24279; end
        5'd31: begin s = 17'd22595; c = 17'd23732; end
      default: begin s = 17'd0; c = 17'd32768; end
    endcase
  end

  // interpolation constants
  always_comb begin
    unique case (alpha[3:0])
        4'd0: begin sb = 16'd0; omc = 16'd0; end
        4'd1: begin sb = 16'd1608; omc = 16'd1; end
        4'd2: begin sb = 16'd3217; omc = 16'd5; end
        4'd3: begin sb = 16'd4825; omc = 16'd11; end
        4'd4: begin sb = 16'd6434; omc = 16'd20; end
        4'd5: begin sb = 16'd8042; omc = 16'd31; end
        4'd6: begin sb = 16'd9651; omc = 16'd44; end
        4'd7: begin sb = 16'd11259; omc = 16'd60; end
        4'd8: begin sb = 16'd12868; omc = 16'd79; end
        4'd9: begin sb = 16'd14476; omc = 16'd100; end
        4'd10: begin sb = 16'd16084; omc = 16'd123; end
        4'd11: begin sb = 16'd17693; omc = 16'd149; end
        4'd12: begin sb = 16'd19301; omc = 16'd178; end
        4'd13: begin sb = 16'd20909; omc = 16'd208; end
        4'd14: begin sb = 16'd22517; omc = 16'd242; end
        4'd15: begin sb = 16'd24125; omc = 16'd278; end
      default: begin sb = 16'd0; omc = 16'd0; end
    endcase
  end

  logic [16:0] s1_s, s1_c;
  logic [15:0] s1_sb, s1_omc;
  logic [2:0]  s1_oct;
  logic        s1_mid;           // alpha == pi/4 exactly

  always_ff @(posedge clk) begin
    s1_s   <= s;
    s1_c   <= c;
    s1_sb  <= sb;
    s1_omc <= omc;
    s1_oct <= oct;
    s1_mid <= alpha[9];
  end

  // ---- stage 2: interpolation products
  logic [32:0] p_csb, p_ssb, p_somc, p_comc;
  logic [16:0] s2_s, s2_c;
  logic [2:0]  s2_oct;
  logic        s2_mid;

  always_ff @(posedge clk) begin
    p_csb  <= 33'(s1_c) * 33'(s1_sb);
    p_ssb  <= 33'(s1_s) * 33'(s1_sb);
    p_somc <= 33'(s1_s) * 33'(s1_omc);
    p_comc <= 33'(s1_c) * 33'(s1_omc);
    s2_s   <= s1_s;
    s2_c   <= s1_c;
    s2_oct <= s1_oct;
    s2_mid <= s1_mid;
  end

  // ---- stage 3: sums, rounding to 13 bits, octant mapping
  logic signed [19:0] u15, v15;    // sin(alpha), cos(alpha), Q15
  logic signed [19:0] u, v;        // Q12, saturated to 4095
  logic signed [19:0] sn, cs;

  always_comb begin
    if (s2_mid) begin
      u15 = 20'sd23170;            // sin(pi/4) * 32768
      v15 = 20'sd23170;
    end else begin
      u15 = $signed({3'b000, s2_s}) + $signed({7'b0, p_csb[32:20]}) - $signed({7'b0, p_somc[32:20]});
      v15 = $signed({3'b000, s2_c}) - $signed({7'b0, p_ssb[32:20]}) - $signed({7'b0, p_comc[32:20]});
    end
    u = (u15 + 20'sd4) >>> 3;
    v = (v15 + 20'sd4) >>> 3;
    if (u > 20'sd4095) u = 20'sd4095;
    if (v > 20'sd4095) v = 20'sd4095;
    unique case (s2_oct)
      3'd0: begin sn =  u; cs =  v; end
      3'd1: begin sn =  v; cs =  u; end
      3'd2: begin sn =  v; cs = -u; end
      3'd3: begin sn =  u; cs = -v; end
      3'd4: begin sn = -u; cs = -v; end
      3'd5: begin sn = -v; cs = -u; end
      3'd6: begin sn = -v; cs =  u; end
      default: begin sn = -u; cs =  v; end
    endcase
  end

  always_ff @(posedge clk) begin
    sin_o <= sample_t'(sn);
    cos_o <= sample_t'(cs);
  end

endmodule
