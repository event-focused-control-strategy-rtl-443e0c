// Self-checking testbench for zcd_event_sync.
// Drives the asynchronous comparator input with edges at random times
// (between clock edges) and checks that each falling edge yields exactly one
// evt pulse, SYNC_STAGES+1 or SYNC_STAGES+2 clocks later, that rising edges
// yield none, and that cmp_sync follows the input.
module zcd_event_sync_tb;
  logic clk = 0, rst_n = 0, cmp_async = 1;
  logic cmp_sync, evt;
  int checks = 0, failures = 0;
  int pulses = 0;
  longint cyc = 0, fall_cyc = -1;

  zcd_event_sync #(.SYNC_STAGES(2), .FALLING(1'b1)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  always @(negedge clk) if (rst_n && evt) begin
    pulses++;
    checks++;
    if (fall_cyc < 0 || cyc - fall_cyc < 3 || cyc - fall_cyc > 4) begin
      failures++;
      $display("FAIL evt at cycle %0d, edge at %0d", cyc, fall_cyc);
    end
    fall_cyc = -1;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n_fall;
    n_fall = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (5) @(posedge clk);
    for (int k = 0; k < 100; k++) begin
      // Falling edge somewhere inside a clock period.
      #(1 + $urandom_range(7));
      cmp_async = 0;
      fall_cyc = cyc;
      n_fall++;
      repeat (10 + $urandom_range(20)) @(posedge clk);
      checks++;
      if (cmp_sync !== 1'b0) begin failures++; $display("FAIL cmp_sync not low"); end
      #(1 + $urandom_range(7));
      cmp_async = 1;   // rising edge: no event expected
      repeat (10 + $urandom_range(20)) @(posedge clk);
      checks++;
      if (cmp_sync !== 1'b1) begin failures++; $display("FAIL cmp_sync not high"); end
    end
    checks++;
    if (pulses != n_fall) begin
      failures++;
      $display("FAIL %0d pulses for %0d falling edges", pulses, n_fall);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
