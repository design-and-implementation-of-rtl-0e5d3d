// fp_ref_pkg: reference IEEE-754 arithmetic for the testbenches.
//
// Double precision quotients come from the simulator's own real division.
// Single precision quotients are computed in double precision and rounded
// to binary32 with round-to-nearest-even (including subnormals); since the
// double quotient carries more than 2*24+2 bits this double rounding is
// exact for division. Results are compared allowing a distance of TOL
// units in the last place, the accuracy the divider guarantees.
package fp_ref_pkg;

  function automatic real sp_to_real(logic [31:0] x);
    real m, v;
    int  e;
    e = int'(x[30:23]);
    m = real'(x[22:0]);
    if (e == 0) v = m * (2.0 ** -149);
    else        v = (m + 8388608.0) * (2.0 ** (e - 150));
    return x[31] ? -v : v;
  endfunction

  // round a double that is neither NaN nor infinite to binary32
  function automatic logic [31:0] real_to_sp(real x);
    logic [63:0]  d;
    logic         s;
    int           e, sh;
    logic [52:0]  m53;
    logic [63:0]  ip, rem, half;
    d   = $realtobits(x);
    s   = d[63];
    if (d[62:52] == 11'd0) return {s, 31'd0};
    e   = int'(d[62:52]) - 1023;
    m53 = {1'b1, d[51:0]};
    if (e >= -126) begin
      sh = 29;
      ip = 64'(m53 >> sh);
    end else begin
      sh = 29 + (-126 - e);
      if (sh >= 60) return {s, 31'd0};
      ip = 64'(m53) >> sh;
    end
    rem  = 64'(m53) & ((64'd1 << sh) - 64'd1);
    half = 64'd1 << (sh - 1);
    if (rem > half || (rem == half && ip[0])) ip = ip + 64'd1;
    if (e >= -126) begin
      // ip in [2^23, 2^24]
      if (ip[24]) begin
        ip = ip >> 1;
        e  = e + 1;
      end
      if (e > 127) return {s, 8'hFF, 23'd0};
      return {s, 8'(e + 127), ip[22:0]};
    end
    return {s, 31'(ip)};  // ip = 2^23 encodes the smallest normal
  endfunction

  function automatic logic [63:0] ref_div_dp(logic [63:0] a, logic [63:0] b);
    return $realtobits($bitstoreal(a) / $bitstoreal(b));
  endfunction

  function automatic bit is_nan_sp(logic [31:0] x);
    return (x[30:23] == 8'hFF) && (x[22:0] != 0);
  endfunction

  function automatic bit is_nan_dp(logic [63:0] x);
    return (x[62:52] == 11'h7FF) && (x[51:0] != 0);
  endfunction

  function automatic logic [31:0] ref_div_sp(logic [31:0] a, logic [31:0] b);
    real q;
    logic s;
    bit   a_inf, b_inf, a_zero, b_zero;
    s      = a[31] ^ b[31];
    a_inf  = a[30:0] == {8'hFF, 23'd0};
    b_inf  = b[30:0] == {8'hFF, 23'd0};
    a_zero = a[30:0] == 31'd0;
    b_zero = b[30:0] == 31'd0;
    if (is_nan_sp(a) || is_nan_sp(b) || (a_inf && b_inf) || (a_zero && b_zero))
      return 32'h7FC0_0000;
    if (a_inf || b_zero) return {s, 8'hFF, 23'd0};
    if (b_inf || a_zero) return {s, 31'd0};
    q = sp_to_real(a) / sp_to_real(b);
    return real_to_sp(q);
  endfunction

  // distance in ulps between two results of the same sign; NaN must match NaN
  function automatic bit close_dp(logic [63:0] got, logic [63:0] exp_v, int tol);
    longint diff;
    if (is_nan_dp(exp_v)) return is_nan_dp(got);
    if (is_nan_dp(got)) return 0;
    if (got[63] != exp_v[63]) return 0;
    diff = longint'({1'b0, got[62:0]}) - longint'({1'b0, exp_v[62:0]});
    if (diff < 0) diff = -diff;
    return diff <= longint'(tol);
  endfunction

  function automatic bit close_sp(logic [31:0] got, logic [31:0] exp_v, int tol);
    int diff;
    if (is_nan_sp(exp_v)) return is_nan_sp(got);
    if (is_nan_sp(got)) return 0;
    if (got[31] != exp_v[31]) return 0;
    diff = int'({1'b0, got[30:0]}) - int'({1'b0, exp_v[30:0]});
    if (diff < 0) diff = -diff;
    return diff <= tol;
  endfunction

  // random operands biased towards the interesting classes
  function automatic logic [63:0] rand_dp();
    logic [63:0] x;
    int unsigned k;
    x = {$urandom, $urandom};
    k = $urandom_range(0, 19);
    case (k)
      0: x[62:52] = 11'd0;                            // subnormal
      1: x[62:0]  = 63'd0;                            // zero
      2: x[62:0]  = {11'h7FF, 52'd0};                 // infinity
      3: x[62:52] = 11'h7FF;                          // NaN (or inf)
      4: x[62:52] = 11'(2046 - $urandom_range(0, 40)); // huge
      5: x[62:52] = 11'($urandom_range(1, 40));         // tiny
      6: begin x[62:52] = 11'd0; x[51:0] = 52'd1 << $urandom_range(0, 51); end
      7: x[51:0] = 52'd0;                             // power of two
      8: x[51:0] = '1;                                // all-ones mantissa
      default: x[62:52] = 11'(1023 + $signed($urandom_range(0, 200)) - 100);
    endcase
    return x;
  endfunction

  function automatic logic [31:0] rand_sp();
    logic [31:0] x;
    int unsigned k;
    x = $urandom;
    k = $urandom_range(0, 19);
    case (k)
      0: x[30:23] = 8'd0;
      1: x[30:0]  = 31'd0;
      2: x[30:0]  = {8'hFF, 23'd0};
      3: x[30:23] = 8'hFF;
      4: x[30:23] = 8'(254 - $urandom_range(0, 20));
      5: x[30:23] = 8'($urandom_range(1, 20));
      6: begin x[30:23] = 8'd0; x[22:0] = 23'd1 << $urandom_range(0, 22); end
      7: x[22:0] = 23'd0;
      8: x[22:0] = '1;
      default: x[30:23] = 8'(127 + $signed($urandom_range(0, 60)) - 30);
    endcase
    return x;
  endfunction

endpackage
