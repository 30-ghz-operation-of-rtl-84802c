// Self-checking testbench of the NDRO gate: random set, reset and read pulses are
// compared, cycle by cycle, with a one-bit reference state kept here. Checks that
// reading does not change the stored bit, that the state changes one clock after a
// set or reset pulse, and that set wins over a simultaneous reset.
module tb_sfq_ndro;
  logic clk = 1'b0, rst_n = 1'b0;
  logic set_i = 1'b0, reset_i = 1'b0, read_i = 1'b0;
  logic out_o, state_o;
  int checks = 0, failures = 0;
  logic ref_state;

  sfq_ndro dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n_set_and_reset = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    ref_state = 1'b0;
    for (int i = 0; i < 2000; i++) begin
      set_i   = ($urandom_range(0, 7) == 0);
      reset_i = ($urandom_range(0, 7) == 0);
      read_i  = $urandom_range(0, 1);
      #1;
      checks++;
      if (out_o !== (ref_state & read_i) || state_o !== ref_state) begin
        failures++;
        $display("FAIL cycle %0d: out=%b state=%b ref=%b read=%b", i, out_o, state_o,
                 ref_state, read_i);
      end
      if (set_i && reset_i) n_set_and_reset++;
      @(posedge clk);
      if (set_i)        ref_state = 1'b1;
      else if (reset_i) ref_state = 1'b0;
      #1;
    end
    checks++;
    if (n_set_and_reset == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
