// tb_pe: self-checking test of one processing element with 4 partial-sum slots.
// A random stream of accumulate, shift, snap and idle steps is applied; a reference
// model of the slots, updated two cycles after each step (the PE's latency), is compared
// with acc_o, sh_o and snap_o on every cycle.
module tb_pe;
  import stereo_pkg::*;
  localparam int SLOTS = 4;
  localparam int SAD_W = 18;

  logic clk = 1'b0, rst_n = 1'b0;
  op_kind_e op;
  logic [1:0] k;
  logic first;
  pix_t r, c;
  logic [SAD_W-1:0] sh_i, sh_o;
  logic [SAD_W-1:0] acc [SLOTS];
  logic snap;
  int checks = 0, failures = 0;

  pe #(.SLOTS(SLOTS), .SAD_W(SAD_W)) dut (
    .clk, .rst_n, .op_i(op), .k_i(k), .first_i(first), .ref_i(r), .cand_i(c),
    .sh_i, .sh_o, .acc_o(acc), .snap_o(snap));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // model
  logic [SAD_W-1:0] m [SLOTS];
  typedef struct { op_kind_e op; int k; bit first; int ad; int sh; } step_t;
  step_t q [$];

  initial begin
    step_t s, d;  // s: step driven now, d: step in the AD register
    int n_acc = 0, n_shift = 0, n_snap = 0;
    op = OP_NOP; k = 0; first = 0; r = 0; c = 0; sh_i = 0;
    for (int i = 0; i < SLOTS; i++) m[i] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 5000; t++) begin
      @(negedge clk);
      // compare with the model (model already holds every step applied 2 cycles ago)
      for (int i = 0; i < SLOTS; i++) begin
        checks++;
        if (acc[i] !== m[i]) begin
          failures++;
          if (failures < 10) $display("t=%0d slot %0d: got %0d want %0d", t, i, acc[i], m[i]);
        end
      end
      checks++;
      if (sh_o !== m[SLOTS-1]) failures++;
      // drive a new step
      s.op    = op_kind_e'($urandom_range(0, 3));
      if ($urandom_range(0, 3) != 0 && s.op != OP_SHIFT) s.op = OP_ACC;
      s.k     = $urandom_range(0, SLOTS-1);
      s.first = ($urandom_range(0, 15) == 0);
      r = pix_t'($urandom); c = pix_t'($urandom);
      s.ad = (r > c) ? r - c : c - r;
      s.sh = $urandom_range(0, 100000);
      op = s.op; k = 2'(s.k); first = s.first; sh_i = SAD_W'(s.sh);
      q.push_back(s);
      // the step driven one cycle ago is in the AD register now and reaches the slots at the next edge
      if (q.size() > 1) begin
        d = q.pop_front();
        checks++;
        if (snap !== (d.op == OP_SNAP)) failures++;
        case (d.op)
          OP_ACC:   begin m[d.k] = d.first ? SAD_W'(d.ad) : m[d.k] + SAD_W'(d.ad); n_acc++; end
          OP_SHIFT: begin
            for (int i = SLOTS-1; i > 0; i--) m[i] = m[i-1];
            m[0] = SAD_W'(s.sh); n_shift++;  // sh_i is taken when the shift is applied
          end
          OP_SNAP:  n_snap++;
          default: ;
        endcase
      end
    end
    if (n_acc == 0 || n_shift == 0 || n_snap == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
