// tb_min_value_unit: self-checking test of the minimum-value unit with 20 candidate
// positions. Random SAD curves (noise, flat stretches, single and multiple valleys) and
// random half window sizes and thresholds are applied, some on consecutive cycles; a
// reference model finds the local minima, Q1, R and the threshold test, and every result
// must appear exactly 3 + clog2(20) cycles after its input.
module tb_min_value_unit;
  localparam int M = 20, SAD_W = 18, HW = 3, XW = $clog2(M), LAT = 3 + $clog2(M);

  logic clk = 1'b0, rst_n = 1'b0, valid = 1'b0;
  logic [SAD_W-1:0] sad [M];
  logic [HW-1:0] h;
  logic [SAD_W-1:0] rth;
  logic res_valid, reliable;
  logic [XW-1:0] q1;
  logic [SAD_W-1:0] fq1, r;
  int checks = 0, failures = 0;
  longint cyc = 0;

  min_value_unit #(.M(M), .SAD_W(SAD_W), .HW(HW)) dut (
    .clk, .rst_n, .valid_i(valid), .sad_i(sad), .h_i(h), .r_th_i(rth),
    .res_valid_o(res_valid), .q1_o(q1), .f_q1_o(fq1), .r_o(r), .reliable_o(reliable));

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef struct { longint due; int q1; int f1; longint r; bit rel; } exp_t;
  exp_t q [$];
  int n_single = 0, n_rel = 0, n_unrel = 0;

  task automatic chk(string what, longint got, longint want);
    checks++;
    if (got != want) begin
      failures++;
      if (failures < 20) $display("FAIL %s got %0d want %0d at %0d", what, got, want, cyc);
    end
  endtask

  always @(negedge clk) begin
    if (rst_n) begin
      if (q.size() > 0 && q[0].due == cyc) begin
        automatic exp_t e = q.pop_front();
        chk("res_valid", res_valid, 1);
        chk("q1", q1, e.q1);
        chk("f_q1", fq1, e.f1);
        chk("r", r, e.r);
        chk("reliable", reliable, e.rel);
      end else begin
        chk("no res_valid", res_valid, 0);
      end
    end
  end

  initial begin
    int f [M];
    rth = 0; h = 0;
    for (int s = 0; s < M; s++) sad[s] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      valid = ($urandom_range(0, 2) != 0);
      if (!valid) continue;
      begin
        automatic int hh = $urandom_range(0, 4);
        automatic int kind = $urandom_range(0, 3);
        automatic int best = -1, second = -1;
        exp_t e;
        for (int s = 0; s < M; s++) begin
          case (kind)
            0: f[s] = $urandom_range(0, 200000);
            1: f[s] = $urandom_range(0, 6) * 10;              // many ties
            2: f[s] = (s - 7) * (s - 7) * 100;                 // one valley
            default: f[s] = ((s % 6) - 3) * ((s % 6) - 3) * 50 + $urandom_range(0, 40);
          endcase
          sad[s] = SAD_W'(f[s]);
        end
        h = HW'(hh);
        rth = SAD_W'($urandom_range(0, 300));
        // valid slots are s >= 2h; local minimum: <= left valid neighbour, < right one
        for (int s = 2 * hh; s < M; s++) begin
          automatic bit lm = (s == 2 * hh || f[s] <= f[s-1]) && (s == M - 1 || f[s] < f[s+1]);
          if (!lm) continue;
          if (best < 0 || f[s] < f[best]) begin
            if (best >= 0 && (second < 0 || f[best] < second)) second = f[best];
            best = s;
          end else if (second < 0 || f[s] < second) second = f[s];
        end
        e.due = cyc + LAT;
        e.q1  = best - hh;
        e.f1  = f[best];
        e.r   = (second < 0) ? (1 << SAD_W) - 1 : second - f[best];
        e.rel = (second < 0) || (second - f[best] > int'(rth));
        if (second < 0) n_single++;
        if (e.rel) n_rel++; else n_unrel++;
        q.push_back(e);
      end
    end
    @(negedge clk);
    valid = 1'b0;
    repeat (LAT + 2) @(negedge clk);
    chk("all results seen", q.size(), 0);
    chk("single minimum case seen", int'(n_single > 0), 1);
    chk("reliable and unreliable seen", int'(n_rel > 0 && n_unrel > 0), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
