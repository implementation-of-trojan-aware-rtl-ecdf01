// Self-checking testbench for bpuf_cell.
//
// Drives the excitation with random high/low stretches that change only on
// falling clock edges and compares q1/q2 after every edge with a reference
// model of the cross-coupled pair: excitation high forces q1=1, q2=0;
// otherwise each rising clock edge swaps the two values. Also checks that
// the preset acts immediately (asynchronously) when exc rises.
module tb_bpuf_cell;
  logic clk = 1'b0;
  logic exc = 1'b1;
  logic q1, q2;
  logic ref_q1, ref_q2;
  int   checks = 0, failures = 0;
  int   swaps = 0, presets = 0;

  bpuf_cell dut (.clk(clk), .exc(exc), .q1(q1), .q2(q2));

  always #5 clk = ~clk;

  task automatic check(string what);
    checks++;
    if (q1 !== ref_q1 || q2 !== ref_q2) begin
      failures++;
      $display("FAIL %s at %0t: q1=%0b q2=%0b expected %0b %0b", what, $time, q1, q2, ref_q1, ref_q2);
    end
  endtask

  // Reference model, rising edge.
  always @(posedge clk) begin
    if (!exc) begin
      {ref_q1, ref_q2} <= {ref_q2, ref_q1};
      swaps++;
    end
  end

  initial begin
    int len;
    ref_q1 = 1'b1; ref_q2 = 1'b0;
    // exc starts high; give it a fresh rising edge so the cell is preset.
    exc = 1'b0; #1 exc = 1'b1; #1;
    check("initial preset");
    repeat (200) begin
      @(negedge clk);
      len = int'($urandom_range(1, 6));
      if ($urandom_range(0, 1) == 1) begin
        exc = 1'b1; ref_q1 = 1'b1; ref_q2 = 1'b0; presets++;
        #1 check("asynchronous preset");
      end else begin
        exc = 1'b0;
      end
      repeat (len) begin
        @(posedge clk); #1 check("after rising edge");
      end
    end
    if (swaps == 0 || presets == 0) begin
      failures++;
      $display("FAIL: swaps=%0d presets=%0d, both must occur", swaps, presets);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
