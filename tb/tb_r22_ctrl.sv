// tb_r22_ctrl: checks the pipeline controller for N = 16, T = 2 (4 beats per
// frame, commutator delays 2 and 1) and T = 8 (1 beat per frame): the local
// beat of every column (input beat minus 0, 0, 2, 3), out_valid from the
// 4th accepted beat on and only in the cycle after an accepted beat, out_beat
// and out_last, with random pauses of the enable.
module tb_r22_ctrl;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [1:0] sb2 [4];
  logic [1:0] ob2;
  logic       v2, l2;
  logic [0:0] sb8 [4];
  logic [0:0] ob8;
  logic       v8, l8;

  r22_ctrl #(.N(16), .T(2)) u2 (.clk(clk), .rst_n(rst_n), .en(en), .stage_beat(sb2),
                                .out_beat(ob2), .out_valid(v2), .out_last(l2));
  r22_ctrl #(.N(16), .T(8)) u8 (.clk(clk), .rst_n(rst_n), .en(en), .stage_beat(sb8),
                                .out_beat(ob8), .out_valid(v8), .out_last(l8));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  int  nbeat = 0;      // accepted beats
  bit  prev_en = 0;
  int  prev_beat = 0;

  always @(negedge clk) begin
    if (rst_n) begin
      // column local beats (combinational, for the beat now at the input)
      check(int'(sb2[0]) == nbeat % 4 && int'(sb2[1]) == nbeat % 4, "spatial columns");
      check(int'(sb2[2]) == (nbeat + 4 - 2) % 4, "column behind D=2");
      check(int'(sb2[3]) == (nbeat + 4 - 3) % 4, "column behind D=2+1");
      check(sb8[3] == 1'b0, "T=8 local beat");
      // registered outputs describe the previous accepted beat
      check(v2 == (prev_en && prev_beat >= 3), "out_valid T=2");
      check(v8 == prev_en, "out_valid T=8");
      if (v2) begin
        check(int'(ob2) == (prev_beat - 3) % 4, "out_beat T=2");
        check(l2 == ((prev_beat - 3) % 4 == 3), "out_last T=2");
      end
      if (v8) check(l8, "out_last T=8");
    end
  end

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int n = 0; n < 300; n++) begin
      en = ($urandom_range(3) != 0);
      @(posedge clk);
      prev_en = en;
      prev_beat = nbeat;
      if (en) nbeat++;
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
