// Self-checking testbench for bw_cell: all 32 input combinations, with the
// expected sum and carry worked out by integer addition of the (optionally
// negated) partial product and the two other inputs.
module tb_bw_cell;
  logic a, b, inv, sum_in, cin, sum, cout;
  int checks = 0, failures = 0;

  bw_cell dut (.a(a), .b(b), .inv(inv), .sum_in(sum_in), .cin(cin), .sum(sum), .cout(cout));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 32; v++) begin
      int pp, total;
      {a, b, inv, sum_in, cin} = 5'(v);
      #1;
      pp    = (a && b) ? 1 : 0;
      if (inv) pp = 1 - pp;
      total = pp + int'(sum_in) + int'(cin);
      checks++;
      if ({cout, sum} !== 2'(total)) begin
        failures++;
        $display("FAIL v=%0d: got %b%b expected %0d", v, cout, sum, total);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
