// tb_ascii_to_integer: converts the published test fields and random
// decimal strings with 0, 1 and 5 fraction digits and compares with a
// reference computed from the string in the testbench.
module tb_ascii_to_integer;
  import gps_pkg::*;
  import tb_gps_pkg::*;
  ascii_field_t f;
  logic [VAL_W-1:0] v5, v1, v0;
  int checks = 0, failures = 0;
  logic clk = 0;

  always #5 clk = ~clk;

  ascii_to_integer #(.FRAC(5)) u5 (.field(f), .value(v5));
  ascii_to_integer #(.FRAC(1)) u1 (.field(f), .value(v1));
  ascii_to_integer #(.FRAC(0)) u0 (.field(f), .value(v0));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic try(string s);
    f = '0;
    for (int i = 0; i < s.len() && i < FIELD_LEN; i++) f.chars[i] = s[i];
    f.len = LEN_W'(s.len() > FIELD_LEN ? FIELD_LEN : s.len());
    #1;
    checks += 3;
    if (v5 != VAL_W'(fixval(s, 5))) begin failures++; $display("'%s' f5 %0d vs %0d", s, v5, fixval(s, 5)); end
    if (v1 != VAL_W'(fixval(s, 1))) begin failures++; $display("'%s' f1 %0d vs %0d", s, v1, fixval(s, 1)); end
    if (v0 != VAL_W'(fixval(s, 0))) begin failures++; $display("'%s' f0 %0d vs %0d", s, v0, fixval(s, 0)); end
  endtask

  initial begin
    string fixed_cases[12] = '{"0756.89465", "11238.31502", "469.0", "04", "", "0",
                               "99999.99999", "465", "12.3456789", "7.", ".5", "05"};
    foreach (fixed_cases[i]) try(fixed_cases[i]);
    checks++;
    // explicit values from the published test data
    try("0756.89465");
    if (v5 != 34'd75689465) failures++;
    try("469.0");
    checks++;
    if (v1 != 34'd4690) failures++;
    for (int n = 0; n < 300; n++) begin
      string s;
      int ni, nf;
      s = "";
      ni = $urandom_range(0, 5);
      nf = $urandom_range(0, 6);
      for (int k = 0; k < ni; k++) s = {s, string'(8'h30 + 8'($urandom_range(0, 9)))};
      if ($urandom_range(0, 3) != 0) begin
        s = {s, "."};
        for (int k = 0; k < nf; k++) s = {s, string'(8'h30 + 8'($urandom_range(0, 9)))};
      end
      try(s);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
