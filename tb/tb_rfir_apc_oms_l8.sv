// tb_rfir_apc_oms_l8: end-to-end self-checking test of the reconfigurable APC-OMS FIR filter
// with an 8-bit input: two 4-bit digit rows, the second weighted by 16.
//
// A reference model keeps its own delay line and coefficient set. On every clock
// edge that advances the filter (en = 1 and no coefficient load running) it forms
// sum_k h(k) x(n-k) from the samples held before the edge and the coefficients held
// at the edge, and y must show that sum LATENCY - 2 advancing edges later; on edges
// that do not advance, y must hold. The run covers, in order:
//   1. an impulse after loading coefficients, to measure the latency (must be
//      4 + log2(TAPS) + log2(Q) advancing edges);
//   2. a 3-tap and a 7-tap filter (the other taps loaded with 0);
//   3. a 9-tap (order 8) windowed-sinc low-pass with cut-off 0.225 fs, a stand-in
//      for the order-8 equiripple design (its coefficients are not published);
//   4. all 16 taps random, with coefficients rewritten at random while samples
//      stream, and en dropped at random.
// Each mechanism must occur at least once: anti-symmetric (complement) digits,
// shift-only digits, zero digits, en stalls, stalls caused by a load, and loads made
// while data was in flight.
module tb_rfir_apc_oms_l8;
  localparam int unsigned TAPS    = 16;
  localparam int unsigned L       = 8;
  localparam int unsigned R       = 4;
  localparam int unsigned Q       = L / R;
  localparam int unsigned LATENCY = 4 + $clog2(TAPS) + ((Q > 1) ? $clog2(Q) : 0);

  int checks = 0, failures = 0;
  int n_cplm = 0, n_shift = 0, n_zero = 0, n_en_stall = 0, n_load_stall = 0, n_live_load = 0;

  logic               clk = 1'b0, rst_n = 1'b0, en = 1'b0;
  logic [L-1:0]       x = '0;
  logic               coef_we = 1'b0;
  logic [3:0]         coef_tap = '0;
  logic signed [15:0] coef_data = '0;
  logic               coef_busy;
  logic signed [31:0] y;

  rfir_apc_oms #(.L(8)) dut (
    .clk (clk), .rst_n (rst_n), .en (en), .x (x),
    .coef_we (coef_we), .coef_tap (coef_tap), .coef_data (coef_data),
    .coef_busy (coef_busy), .y (y)
  );

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Reference model.
  int     hm [TAPS];          // coefficients in the filter
  int     xm [TAPS];          // model delay line, xm[0] newest
  longint hist [int];         // expected sums by advancing-edge index
  int     ne = 0;             // advancing edges so far
  longint y_exp = 0;          // what y must show now

  // Drive one cycle: inputs are set at the falling edge, the model is updated for
  // the rising edge, and y is checked just after it.
  task automatic cycle(bit t_en, int t_x, bit t_we, int t_tap, int t_coef);
    bit adv, take_load;
    @(negedge clk);
    en = t_en; x = L'(t_x); coef_we = t_we; coef_tap = 4'(t_tap); coef_data = 16'(t_coef);
    adv       = t_en && !coef_busy;
    take_load = t_we && !coef_busy;
    if (t_en && coef_busy) n_load_stall++;
    if (!t_en) n_en_stall++;
    if (take_load && ne > 0 && y_exp != 0) n_live_load++;
    if (adv) begin
      longint s;
      s = 0;
      for (int k = 0; k < int'(TAPS); k++) s += longint'(hm[k]) * xm[k];
      hist[ne] = s;
      for (int k = int'(TAPS) - 1; k > 0; k--) xm[k] = xm[k-1];
      xm[0] = int'(x);
      for (int q = 0; q < int'(Q); q++) begin
        int d;
        d = (int'(x) >> (R * q)) & 15;
        if (d == 0) n_zero++;
        else if (d > 8) n_cplm++;
        else n_shift++;
      end
      ne++;
      if (ne >= int'(LATENCY) - 1) y_exp = hist[ne - (int'(LATENCY) - 1)];
    end
    if (take_load) hm[t_tap] = t_coef;
    @(posedge clk);
    #1;
    checks++;
    if (longint'(y) != y_exp) begin
      failures++;
      if (failures < 10) $display("FAIL edge %0d: y=%0d want %0d", ne, y, y_exp);
    end
  endtask

  task automatic load(int tap, int h);
    cycle(1'b0, 0, 1'b1, tap, h);
    while (coef_busy) cycle(1'b0, 0, 1'b0, 0, 0);
  endtask

  task automatic stream(int n, int en_pct, int load_pct);
    for (int i = 0; i < n; i++) begin
      bit e, w;
      e = ($urandom_range(99) < en_pct);
      w = ($urandom_range(99) < load_pct);
      cycle(e, int'($urandom) & ((1 << L) - 1), w, int'($urandom_range(TAPS - 1)),
            int'($signed(16'($urandom))));
    end
  endtask

  initial begin
    int lat_seen;
    foreach (hm[k]) hm[k] = 0;
    foreach (xm[k]) xm[k] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    // 1. Impulse and latency.
    for (int k = 0; k < int'(TAPS); k++) load(k, (k == 0) ? 1000 : 0);
    cycle(1'b1, 1, 1'b0, 0, 0);
    lat_seen = 1;
    while (y == 0 && lat_seen < 40) begin cycle(1'b1, 0, 1'b0, 0, 0); lat_seen++; end
    checks++;
    if (lat_seen != int'(LATENCY) || y != 1000) begin
      failures++;
      $display("FAIL latency %0d (y=%0d), want %0d", lat_seen, y, LATENCY);
    end
    $display("latency: %0d advancing edges", lat_seen);

    // 2. 3-tap and 7-tap filters.
    for (int k = 0; k < int'(TAPS); k++) load(k, (k < 3) ? int'($signed(16'($urandom))) : 0);
    stream(300, 90, 0);
    for (int k = 0; k < int'(TAPS); k++) load(k, (k < 7) ? int'($signed(16'($urandom))) : 0);
    stream(300, 90, 0);

    // 3. Order-8 low-pass stand-in: h(k) = 0.45 sinc(0.45 (k - 4)) * Hamming(k), Q15.
    for (int k = 0; k < int'(TAPS); k++) begin
      real t, h;
      t = real'(k - 4);
      h = (k == 4) ? 0.45 : $sin(3.14159265358979 * 0.45 * t) / (3.14159265358979 * t);
      h = h * (0.54 - 0.46 * $cos(2.0 * 3.14159265358979 * real'(k) / 8.0));
      load(k, (k < 9) ? int'($rtoi(h * 32767.0 + ((h >= 0.0) ? 0.5 : -0.5))) : 0);
    end
    stream(300, 100, 0);

    // 4. 16 random taps, live reconfiguration and stalls.
    for (int k = 0; k < int'(TAPS); k++) load(k, int'($signed(16'($urandom))));
    load(5, -32768);
    load(9, 32767);
    stream(4000, 80, 3);
    // Drain with zeros so every sample's output is seen.
    stream(int'(LATENCY) + 2, 100, 0);

    $display("mechanisms: complement=%0d shift=%0d zero=%0d en_stall=%0d load_stall=%0d live_load=%0d",
             n_cplm, n_shift, n_zero, n_en_stall, n_load_stall, n_live_load);
    checks++;
    if (n_cplm == 0 || n_shift == 0 || n_zero == 0 || n_en_stall == 0 ||
        n_load_stall == 0 || n_live_load == 0) begin
      failures++;
      $display("FAIL a mechanism never occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
