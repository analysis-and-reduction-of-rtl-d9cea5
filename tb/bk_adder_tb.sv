// bk_adder_tb: test of the Brent-Kung adder against integer addition.
// The default 4-bit adder and an 8-bit one are tested exhaustively over
// a, b and cin; a 32-bit adder is tested with random operands and with the
// full-propagate case a + ~a + cin.
module bk_adder_tb;
  int checks = 0, failures = 0;

  logic [3:0]  a4, b4, s4;   logic c4, ci4;
  logic [7:0]  a8, b8, s8;   logic c8, ci8;
  logic [31:0] a32, b32, s32; logic c32, ci32;

  bk_adder               dut4  (.a(a4),  .b(b4),  .cin(ci4),  .s(s4),  .cout(c4));
  bk_adder #(.W(8))      dut8  (.a(a8),  .b(b8),  .cin(ci8),  .s(s8),  .cout(c8));
  bk_adder #(.W(32))     dut32 (.a(a32), .b(b32), .cin(ci32), .s(s32), .cout(c32));

  initial begin : watchdog
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 512; v++) begin
      {ci4, b4, a4} = 9'(v);
      #1;
      checks++;
      if ({c4, s4} !== 5'(int'(a4) + int'(b4) + int'(ci4))) begin
        failures++; $display("FAIL W=4 %0d+%0d+%0d = %0d", a4, b4, ci4, {c4, s4});
      end
    end
    for (int v = 0; v < 131072; v++) begin
      {ci8, b8, a8} = 17'(v);
      #1;
      checks++;
      if ({c8, s8} !== 9'(int'(a8) + int'(b8) + int'(ci8))) begin
        failures++; $display("FAIL W=8 %0d+%0d+%0d = %0d", a8, b8, ci8, {c8, s8});
      end
    end
    for (int v = 0; v < 20000; v++) begin
      a32 = $urandom; b32 = (v % 8 == 0) ? ~a32 : $urandom; ci32 = 1'($urandom);
      #1;
      checks++;
      if ({c32, s32} !== 33'(a32) + 33'(b32) + 33'(ci32)) begin
        failures++; $display("FAIL W=32 %h+%h+%0d = %h", a32, b32, ci32, {c32, s32});
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
