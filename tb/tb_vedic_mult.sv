// tb_vedic_mult: checks the Urdhva Tiryakbhyam multiplier against the
// ordinary product on corner cases and 2000 random operand pairs.
module tb_vedic_mult;
  localparam int AW = 22, BW = 12;
  logic [AW-1:0]    a;
  logic [BW-1:0]    b;
  logic [AW+BW-1:0] p;
  int checks = 0, failures = 0;

  vedic_mult #(.AW(AW), .BW(BW)) dut (.a(a), .b(b), .p(p));

  task automatic try(input logic [AW-1:0] x, input logic [BW-1:0] y);
    logic [63:0] ref_p;
    a = x; b = y;
    #1;
    ref_p = 64'(x) * 64'(y);
    checks++;
    if (64'(p) != ref_p) begin
      failures++;
      if (failures < 10) $display("%0d * %0d: got %0d expected %0d", x, y, p, ref_p);
    end
  endtask

  initial begin
    try('0, '0); try('1, '1); try('1, 1); try(1, '1); try(22'h200000, 12'h800);
    for (int i = 0; i < 2000; i++) try(AW'($urandom), BW'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
