// Self-checking testbench for ol_cl_mux: random closed-loop and user words,
// both select values; the output must equal the user word in open loop and
// the closed-loop word otherwise.
module ol_cl_mux_tb;
  logic        open_loop;
  logic [15:0] closed_val, user_val, out;
  int checks = 0, failures = 0;

  ol_cl_mux #(.W(16)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 200; i++) begin
      closed_val = 16'($urandom);
      user_val   = 16'($urandom);
      if (i % 7 == 0) user_val = ~closed_val;
      open_loop  = 1'($urandom);
      #1;
      checks++;
      if (out !== (open_loop ? user_val : closed_val)) begin
        failures++;
        $display("FAIL ol=%0b closed=%h user=%h out=%h", open_loop, closed_val, user_val, out);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
