// tb_sad_unit: self-checking test of the SAD unit with 4 PEs of 3 candidate windows each
// (12 candidate positions). For several window sizes it plays the control-step schedule
// column by column (W*W*3 accumulate steps, a shift between columns, a snap at the end),
// with a random reference window and random candidate pixels per column, and compares
// every SAD of a window lying inside the 12 columns with a directly computed sum. The
// snap must appear one cycle after it is issued, when the last sum is in place.
module tb_sad_unit;
  import stereo_pkg::*;
  localparam int M = 12, N_PE = 4, SLOTS = M / N_PE, SAD_W = 18, WM = 7;

  logic clk = 1'b0, rst_n = 1'b0;
  op_kind_e op;
  logic [1:0] k;
  logic first;
  pix_t r;
  pix_t cand [N_PE];
  logic [SAD_W-1:0] sad [M];
  logic snap;
  int checks = 0, failures = 0;
  longint cyc = 0;

  sad_unit #(.M(M), .N_PE(N_PE), .SAD_W(SAD_W)) dut (
    .clk, .rst_n, .op_i(op), .k_i(k), .first_i(first), .ref_i(r), .cand_i(cand),
    .sad_o(sad), .snap_o(snap));

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int refw [WM][WM];    // reference window, [column][row]
  int img  [M][WM];     // candidate image columns x window rows

  initial begin
    longint t_snap;
    op = OP_NOP; k = 0; first = 0; r = 0;
    for (int p = 0; p < N_PE; p++) cand[p] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int rep = 0; rep < 12; rep++) begin
      automatic int w = 3 + 2 * (rep % 3);
      automatic int h = (w - 1) / 2;
      for (int i = 0; i < w; i++)
        for (int j = 0; j < w; j++) refw[i][j] = $urandom_range(0, 255);
      for (int x = 0; x < M; x++)
        for (int j = 0; j < w; j++) img[x][j] = (rep % 4 == 3) ? refw[(x + 1) % w][j] : $urandom_range(0, 255);
      for (int i = 0; i < w; i++) begin
        for (int j = 0; j < w; j++)
          for (int kk = 0; kk < SLOTS; kk++) begin
            @(negedge clk);
            op = OP_ACC; k = 2'(kk); first = (i == 0 && j == 0);
            r = pix_t'(refw[i][j]);
            for (int p = 0; p < N_PE; p++) cand[p] = pix_t'(img[p * SLOTS + kk][j]);
          end
        if (i != w - 1) begin
          @(negedge clk);
          op = OP_SHIFT; first = 0;
        end
      end
      @(negedge clk);
      op = OP_SNAP; first = 0;
      t_snap = cyc;
      @(negedge clk);
      op = OP_NOP;
      while (!snap) @(negedge clk);
      checks++;
      if (cyc - t_snap != 1) begin
        failures++;
        $display("FAIL snap latency %0d", cyc - t_snap);
      end
      // after the last column, slot s holds the window centred on column s - h
      for (int s = 2 * h; s < M; s++) begin
        automatic int c = s - h;
        automatic int want = 0;
        for (int i = -h; i <= h; i++)
          for (int j = 0; j < w; j++) begin
            automatic int d = refw[i + h][j] - img[c + i][j];
            want += (d < 0) ? -d : d;
          end
        checks++;
        if (int'(sad[s]) != want) begin
          failures++;
          if (failures < 20) $display("FAIL w=%0d slot %0d got %0d want %0d", w, s, sad[s], want);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
