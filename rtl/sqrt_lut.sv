// sqrt_lut: exact integer square root floor(sqrt(x)) of a 16-bit value in a
// three-step pipeline, using small tables instead of one 64K-entry table.
//
// Above 256 the slope of sqrt(x) is below 1/32, so within any 32 consecutive
// values the integer root rises by at most one. The input range is split:
//   x < 256               r = LUTV1[x]                         (x[7:0])
//   256 <= x < 16384      k = x[13:5]:  r = LUTV2[k] + (x[4:0] >= LUTC2[k])
//   16384 <= x            k = x[15:7]:  r = LUTV3[k] + (x[6:0] >= LUTC3[k])
// where LUTV2[k] = floor(sqrt(32k)), LUTC2[k] = (LUTV2[k]+1)^2 - 32k (the
// offset inside the interval at which the root steps up), and likewise
// LUTV3[k] = floor(sqrt(128k)), LUTC3[k] = (LUTV3[k]+1)^2 - 128k. The tables
// are computed at elaboration by constant functions and read as registered
// ROMs.
//   step 1  all five tables are read, x is registered
//   step 2  the two corrections are compared and added
//   step 3  the range selects the result (x[15:8] == 0, else x[15:14] == 0)
// r is ready 3 steps after x is sampled. The tables, their address bits and
// the three-step organisation follow the document; the middle range reaching
// up to 16384 follows its pipeline drawing (its algorithm listing switches at
// 8192; both give the exact root).
module sqrt_lut (
  input  logic        clk,
  input  logic        ce,
  input  logic [15:0] x,
  output logic [7:0]  r
);

  typedef logic [7:0] v1_t [256];
  typedef logic [7:0] v_t  [512];
  typedef logic [9:0] c_t  [512];

  function automatic int unsigned isqrt(int unsigned v);
    int unsigned s = 0;
    while ((s + 1) * (s + 1) <= v) s++;
    return s;
  endfunction

  function automatic v1_t gen_v1();
    v1_t t;
    for (int unsigned i = 0; i < 256; i++) t[i] = 8'(isqrt(i));
    return t;
  endfunction

  function automatic v_t gen_v(int unsigned step);
    v_t t;
    for (int unsigned i = 0; i < 512; i++) t[i] = 8'(isqrt(step * i));
    return t;
  endfunction

  function automatic c_t gen_c(int unsigned step);
    c_t t;
    int unsigned v;
    for (int unsigned i = 0; i < 512; i++) begin
      v    = isqrt(step * i);
      t[i] = 10'((v + 1) * (v + 1) - step * i);
    end
    return t;
  endfunction

  localparam v1_t LUTV1 = gen_v1();
  localparam v_t  LUTV2 = gen_v(32);
  localparam c_t  LUTC2 = gen_c(32);
  localparam v_t  LUTV3 = gen_v(128);
  localparam c_t  LUTC3 = gen_c(128);

  // step 1: table reads
  logic [15:0] x1;
  logic [7:0]  v1, v2, v3;
  logic [9:0]  c2, c3;
  always_ff @(posedge clk) begin
    if (ce) begin
      x1 <= x;
      v1 <= LUTV1[x[7:0]];
      v2 <= LUTV2[x[13:5]];
      c2 <= LUTC2[x[13:5]];
      v3 <= LUTV3[x[15:7]];
      c3 <= LUTC3[x[15:7]];
    end
  end

  // step 2: corrections (only the range bits of x travel on)
  logic [15:8] x2;
  logic [7:0]  r1, r2, r3;
  always_ff @(posedge clk) begin
    if (ce) begin
      x2 <= x1[15:8];
      r1 <= v1;
      r2 <= v2 + 8'(10'(x1[4:0]) >= c2);
      r3 <= v3 + 8'(10'(x1[6:0]) >= c3);
    end
  end

  // step 3: range select
  always_ff @(posedge clk) begin
    if (ce) begin
      if (x2[15:8] == '0)       r <= r1;
      else if (x2[15:14] == '0) r <= r2;
      else                      r <= r3;
    end
  end

endmodule
