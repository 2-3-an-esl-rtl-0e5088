// tb_r22_delay_commutator: feeds two tagged streams into delay commutators
// with D = 1, 2 and 4 and checks the re-pairing. Input port p in beat c
// carries the tag 1000*p + c. With sel = beat bit log2(D), output beat tau
// (tau = c - D) must carry, on port 0 and port 1, the samples of input port
// k = tau[log2 D] whose beats are tau with that bit cleared and set. Includes
// random pauses of the enable, during which nothing may move.
module tb_r22_delay_commutator;
  localparam int W = 16;
  logic clk = 1'b0, en = 1'b0;
  int   beat = 0;          // input beats so far
  int   checks = 0, failures = 0;
  always #5 clk = ~clk;

  logic signed [W-1:0] a_re, a_im, b_re, b_im;
  assign a_re = W'(beat);
  assign a_im = W'(-beat);
  assign b_re = W'(1000 + beat);
  assign b_im = W'(-1000 - beat);

  for (genvar i = 0; i < 3; i++) begin : g_d
    localparam int D = 1 << i;
    logic signed [W-1:0] o0_re, o0_im, o1_re, o1_im;
    r22_delay_commutator #(.W(W), .D(D)) dut (
      .clk(clk), .en(en), .sel(beat[i]),
      .a_re(a_re), .a_im(a_im), .b_re(b_re), .b_im(b_im),
      .o0_re(o0_re), .o0_im(o0_im), .o1_re(o1_re), .o1_im(o1_im)
    );
    // combinational outputs belong to input beat `beat`, i.e. output beat beat-D
    always @(negedge clk) begin
      if (en && beat >= 2 * D) begin
        int tau, k, base, e0, e1;
        tau  = beat - D;
        k    = (tau >> i) & 1;
        base = tau & ~D;
        e0   = 1000 * k + base;
        e1   = 1000 * k + (base | D);
        checks++;
        if (int'(o0_re) != e0 || int'(o1_re) != e1 || int'(o0_im) != -e0 || int'(o1_im) != -e1) begin
          failures++;
          if (failures < 10)
            $display("FAIL D=%0d beat=%0d got (%0d,%0d) expected (%0d,%0d)", D, beat, o0_re, o1_re, e0, e1);
        end
      end
    end
  end

  initial begin
    repeat (2) @(posedge clk);
    for (int n = 0; n < 200; n++) begin
      @(negedge clk);
      en = ($urandom_range(4) != 0);
      @(posedge clk);
      #1 if (en) beat = beat + 1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
