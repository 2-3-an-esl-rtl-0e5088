// tb_r22_perm: checks the lane permutations of an 8-lane (t = 4) datapath:
// natural input order into a column pairing on address bit 2, and from a
// column pairing on bit 2 to one pairing on bit 1, and bit 1 to bit 0. The
// expected lane of every sample is written out bit by bit here.
module tb_r22_perm;
  localparam int P = 8;
  localparam int W = 8;
  logic signed [W-1:0] in_re [P], in_im [P];
  logic signed [W-1:0] o0_re [P], o0_im [P], o1_re [P], o1_im [P], o2_re [P], o2_im [P];
  int checks = 0, failures = 0;

  r22_perm #(.P(P), .W(W), .FROM_J(-1), .TO_J(2)) u0 (.in_re(in_re), .in_im(in_im), .out_re(o0_re), .out_im(o0_im));
  r22_perm #(.P(P), .W(W), .FROM_J(2),  .TO_J(1)) u1 (.in_re(in_re), .in_im(in_im), .out_re(o1_re), .out_im(o1_im));
  r22_perm #(.P(P), .W(W), .FROM_J(1),  .TO_J(0)) u2 (.in_re(in_re), .in_im(in_im), .out_re(o2_re), .out_im(o2_im));

  task automatic expect_lane(string tag, logic signed [W-1:0] got_re, logic signed [W-1:0] got_im, int src);
    checks++;
    if (int'(got_re) != 10 + src || int'(got_im) != -10 - src) begin
      failures++;
      $display("FAIL %s: got %0d, expected sample of input lane %0d", tag, got_re, src);
    end
  endtask

  initial begin
    int a;
    for (int q = 0; q < P; q++) begin in_re[q] = W'(10 + q); in_im[q] = W'(-10 - q); end
    #1;
    for (int q = 0; q < P; q++) begin
      // u0: input lane = address a; output lane {a1, a0, a2}
      a = q;
      expect_lane("natural->2", o0_re[((a & 3) << 1) | (a >> 2)], o0_im[((a & 3) << 1) | (a >> 2)], q);
      // u1: input lane {a1, a0, a2} -> a; output lane {a2, a0, a1}
      a = ((q & 1) << 2) | (q >> 1);
      expect_lane("2->1", o1_re[(((a >> 2) & 1) << 2) | ((a & 1) << 1) | ((a >> 1) & 1)],
                          o1_im[(((a >> 2) & 1) << 2) | ((a & 1) << 1) | ((a >> 1) & 1)], q);
      // u2: input lane {a2, a0, a1} -> a; output lane {a2, a1, a0} = a
      a = (((q >> 2) & 1) << 2) | ((q & 1) << 1) | ((q >> 1) & 1);
      expect_lane("1->0", o2_re[a], o2_im[a], q);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
