// tb_arith_unit: self-checking test of the adder/subtractor.
//
// Checks every (a, b) pair of 8-bit operands for both operations with both
// carry-in values against integer arithmetic: add gives a + b + cin and its
// carry, subtract gives a - b - cin and its borrow. It also checks increment
// and decrement (b = 0, cin = 1) and the worked example a = 10101000,
// b = 00110111, a - b = 01110001.
`timescale 1ns/1ps
module tb_arith_unit;

  localparam int unsigned W = 8;

  logic [W-1:0] a, b, y;
  logic         cin, sub, cout;

  int checks   = 0;
  int failures = 0;

  arith_unit #(.WIDTH(W)) dut (.a(a), .b(b), .cin(cin), .sub(sub), .y(y), .cout(cout));

  task automatic apply_check(input int ia, input int ib, input int icin, input int isub);
    int r;
    logic [W-1:0] ey;
    logic ec;
    a = W'(ia); b = W'(ib); cin = 1'(icin); sub = 1'(isub);
    #1;
    if (isub == 0) r = ia + ib + icin;
    else           r = ia - ib - icin;
    ey = W'(r);
    ec = (isub == 0) ? (r > (1 << W) - 1) : (r < 0);
    checks++;
    if (y !== ey || cout !== ec) begin
      failures++;
      if (failures < 10)
        $display("FAIL a=%0d b=%0d cin=%0d sub=%0d: y=%0d cout=%0b expected %0d %0b",
                 ia, ib, icin, isub, y, cout, ey, ec);
    end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int ia = 0; ia < (1 << W); ia++)
      for (int ib = 0; ib < (1 << W); ib++)
        for (int c = 0; c < 2; c++)
          for (int s = 0; s < 2; s++)
            apply_check(ia, ib, c, s);
    // worked example: 10101000 - 00110111 = 01110001
    a = 8'b1010_1000; b = 8'b0011_0111; cin = 1'b0; sub = 1'b1; #1;
    checks++;
    if (y !== 8'b0111_0001) begin failures++; $display("FAIL worked example: %b", y); end
    // increment and decrement with b = 0, cin = 1
    a = 8'd41; b = '0; cin = 1'b1; sub = 1'b0; #1;
    checks++;
    if (y !== 8'd42) begin failures++; $display("FAIL increment: %0d", y); end
    sub = 1'b1; #1;
    checks++;
    if (y !== 8'd40) begin failures++; $display("FAIL decrement: %0d", y); end
    a = 8'hFF; sub = 1'b0; #1;
    checks++;
    if (y !== 8'h00 || cout !== 1'b1) begin failures++; $display("FAIL increment wrap"); end
    a = 8'h00; sub = 1'b1; #1;
    checks++;
    if (y !== 8'hFF || cout !== 1'b1) begin failures++; $display("FAIL decrement wrap"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
