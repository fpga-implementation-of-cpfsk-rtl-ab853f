// tb_sq_correlator - self-checking testbench of the sign-check-and-complement
// accumulator. Runs 200 random "bit periods" of random length (1 to 80
// samples) with random 16-bit samples, random basis signs and random idle
// cycles, and compares the sum with an integer model after every sample.
// Full-scale samples (-32768 and 32767) over 80 samples check the width.
module tb_sq_correlator;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic en = 1'b0, start = 1'b0, basis = 1'b0;
  logic signed [15:0] x = '0;
  logic signed [22:0] acc, nxt;
  int checks = 0, failures = 0;
  longint model = 0;

  always #5 clk = ~clk;

  sq_correlator dut (.clk, .rst_n, .en_i(en), .start_i(start), .basis_i(basis),
                     .x_i(x), .acc_o(acc), .next_o(nxt));

  task automatic sample(logic st, logic b, logic signed [15:0] v);
    en = 1'b1; start = st; basis = b; x = v;
    @(negedge clk);
    model = (st ? 0 : model) + (b ? longint'(v) : -longint'(v));
    en = 1'b0; start = 1'b0;
    checks++;
    if (longint'(acc) != model) begin
      failures++;
      if (failures < 10) $display("FAIL acc %0d expected %0d", acc, model);
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int p = 0; p < 200; p++) begin
      int len;
      len = 1 + int'($urandom % 80);
      for (int i = 0; i < len; i++) begin
        sample(i == 0, 1'($urandom), 16'($urandom));
        if ($urandom % 4 == 0) @(negedge clk);   // idle cycle holds the sum
      end
    end
    // worst case: 80 full-scale samples of each sign
    for (int i = 0; i < 80; i++) sample(i == 0, 1'b1, 16'sh8000);
    for (int i = 0; i < 80; i++) sample(i == 0, 1'b0, 16'sh8000);
    for (int i = 0; i < 80; i++) sample(i == 0, 1'b1, 16'sh7fff);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
