// Shared body of the end-to-end testbenches of stereo_processor. The including module
// defines the localparams IMG_W, IMG_H, N_PE, W_MIN, W_MAX, RTH, DISP, PATTERN,
// CHECK_EVERY and MAX_CYCLES, declares clk, rst_n, start, done and the result-port signals
// and instantiates the processor as dut and the memories as u_lm / u_rm.
//
// Test images: the right image is the left image shifted by DISP pixels. The left image
// mixes three kinds of area: random texture (matched with the smallest window), flat
// gray with sparse random dots (small windows are ambiguous there, so the window has to
// grow until it catches a dot) and a texture that repeats horizontally every W_MAX+1
// pixels (two equally good candidates for every window size: no corresponding pixel).
// PATTERN 0 splits the image into three vertical bands of these; PATTERN 1 is texture
// everywhere except a 40 x 40 dotted patch and a 62 x 36 periodic patch, which keeps a
// full-size run short. Every CHECK_EVERY-th result is compared with a reference model of the whole
// algorithm written independently below; the spacing of consecutive results on a line is
// compared with the cycle count of the control-step schedule.

  localparam int M     = IMG_W;
  localparam int HMAX  = (W_MAX - 1) / 2;
  localparam int SLOTS = M / N_PE;
  localparam int LV    = $clog2(M);
  localparam int SAD_W = stereo_pkg::sad_width(W_MAX);

  int checks = 0, failures = 0;
  longint cyc = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (MAX_CYCLES) @(posedge clk);
    failures++;
    $display("watchdog: stopped after %0d cycles", MAX_CYCLES);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int hsh(int x, int y, int salt);
    int unsigned v;
    v = x * 32'h9E3779B1 ^ y * 32'h85EBCA77 ^ salt * 32'hC2B2AE3D;
    v = v ^ (v >> 15);
    v = v * 32'h2C1B3C6D;
    v = v ^ (v >> 12);
    return int'(v & 32'h7fffffff);
  endfunction

  function automatic int left_pix(int x, int y);
    int kind;  // 0 texture, 1 dotted flat, 2 periodic texture
    if (PATTERN == 0) kind = (x < IMG_W / 3) ? 0 : (x < 7 * IMG_W / 12) ? 1 : 2;
    else if (x >= 100 && x < 140 && y >= 60 && y < 100) kind = 1;
    else if (x >= 300 && x < 362 && y >= 200 && y < 236) kind = 2;
    else kind = 0;
    case (kind)
      0:       return hsh(x, y, 1) % 256;
      1:       return (hsh(x, y, 2) % 9 == 0) ? 200 : 100;
      default: return hsh(x % (W_MAX + 1), y, 4) % 256;
    endcase
  endfunction

  function automatic int right_pix(int x, int y);
    return (x + DISP < IMG_W) ? left_pix(x + DISP, y) : hsh(x, y, 3) % 256;
  endfunction

  // zero-padded images
  function automatic int lz(int x, int y);
    if (x < 0 || x >= IMG_W || y < 0 || y >= IMG_H) return 0;
    return left_pix(x, y);
  endfunction
  function automatic int rz(int x, int y);
    if (x < 0 || x >= IMG_W || y < 0 || y >= IMG_H) return 0;
    return right_pix(x, y);
  endfunction

  // reference model of the variable-window search for reference pixel (ul, vl)
  task automatic model(input int ul, input int vl, output int ur, output int wo,
                       output bit found);
    int f [M];
    for (int w = W_MIN; ; w += 2) begin
      int h = (w - 1) / 2;
      int best = -1, second = -1;
      for (int c = h; c <= M - 1 - h; c++) begin
        int s = 0;
        for (int i = -h; i <= h; i++)
          for (int j = -h; j <= h; j++) begin
            int d = lz(ul + i, vl + j) - rz(c + i, vl + j);
            s += (d < 0) ? -d : d;
          end
        f[c] = s;
      end
      for (int c = h; c <= M - 1 - h; c++) begin
        bit is_min = (c == h || f[c] <= f[c-1]) && (c == M - 1 - h || f[c] < f[c+1]);
        if (!is_min) continue;
        if (best < 0 || f[c] < f[best]) begin
          if (best >= 0 && (second < 0 || f[best] < second)) second = f[best];
          best = c;
        end else if (second < 0 || f[c] < second) begin
          second = f[c];
        end
      end
      ur = best;
      wo = w;
      found = (second < 0) || (second - f[best] > RTH);
      if (found || w + 2 > W_MAX) return;
    end
  endtask

  // control steps from the end of one pixel to the end of the next on the same line
  function automatic int pixel_cycles(int w_final);
    int n = W_MAX + 2;
    for (int w = W_MIN; w <= w_final; w += 2) n += w * w * SLOTS + w + 5 + LV;
    return n;
  endfunction

  // mechanism counters
  int n_found_min = 0, n_expanded = 0, n_not_found = 0, n_shift = 0, n_refill = 0;
  int n_zero_rows = 0, n_right_disp = 0, n_results = 0, n_timed = 0;

  always @(posedge clk) begin
    if (rst_n && dut.u_ctrl.op_o == stereo_pkg::OP_SHIFT) n_shift++;
    // a row fetched while the reference buffer is loaded or SADs are computed
    if (rst_n && dut.rm_req_o && (dut.u_ctrl.ll_busy || dut.u_ctrl.op_o != stereo_pkg::OP_NOP))
      n_refill++;
    if (rst_n && dut.u_ctrl.cb_rd_en_o && dut.u_ctrl.cb_rd_zero_o) n_zero_rows++;
  end

  task automatic check(string what, int got, int want);
    checks++;
    if (got != want) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0d want %0d", what, got, want);
    end
  endtask

  longint last_res = 0;
  int exp_ul = 0, exp_vl = 0;

  always @(posedge clk) begin
    if (res_valid && rst_n) begin
      int ur, w;
      bit found;
      check("ul", int'(res_ul), exp_ul);
      check("vl", int'(res_vl), exp_vl);
      if (res_w == W_MIN && res_found) n_found_min++;
      if (res_w > W_MIN && res_found) n_expanded++;
      if (!res_found) n_not_found++;
      if (res_found && int'(res_ur) == int'(res_ul) - DISP) n_right_disp++;
      if (n_results % CHECK_EVERY == 0) begin
        model(int'(res_ul), int'(res_vl), ur, w, found);
        check("ur", int'(res_ur), ur);
        check("w", int'(res_w), w);
        check("found", int'(res_found), int'(found));
      end
      if (res_ul != 0) begin
        check("cycles per pixel", int'(cyc - last_res), pixel_cycles(int'(res_w)));
        n_timed++;
      end
      last_res = cyc;
      n_results++;
      if (exp_ul == IMG_W - 1) begin exp_ul = 0; exp_vl++; end
      else exp_ul++;
    end
  end

  initial begin
    for (int y = 0; y < IMG_H; y++)
      for (int x = 0; x < IMG_W; x++) begin
        u_lm.mem[y][x] = stereo_pkg::pix_t'(left_pix(x, y));
        u_rm.mem[y][x] = stereo_pkg::pix_t'(right_pix(x, y));
      end
    start = 1'b0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);
    start <= 1'b1;
    @(posedge clk);
    start <= 1'b0;
    while (!done) @(posedge clk);
    repeat (2) @(posedge clk);
    check("results", n_results, IMG_W * IMG_H);
    $display("cycles=%0d results=%0d found_at_wmin=%0d found_after_expansion=%0d not_found=%0d",
             cyc, n_results, n_found_min, n_expanded, n_not_found);
    $display("shift_steps=%0d background_refill_cycles=%0d zero_row_reads=%0d timed_pixels=%0d expected_disparity=%0d",
             n_shift, n_refill, n_zero_rows, n_timed, n_right_disp);
    // every mechanism must have happened
    check("found at W_MIN happened", int'(n_found_min > 0), 1);
    check("window expansion happened", int'(n_expanded > 0), 1);
    check("no corresponding pixel happened", int'(n_not_found > 0), 1);
    check("chain shift happened", int'(n_shift > 0), 1);
    check("background refill happened", int'(n_refill > 0), 1);
    check("border zero rows happened", int'(n_zero_rows > 0), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
