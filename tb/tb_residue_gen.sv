// tb_residue_gen: checks residue_gen against the % operator.
// Two instances: 3-bit residue (mod 7) of 64-bit values and 2-bit residue
// (mod 3) of 7-bit register names. Random values plus corner cases
// (0, all ones, multiples of the modulus).
module tb_residue_gen;
  int checks = 0, failures = 0;

  logic [63:0] v64;
  logic [2:0]  r64;
  logic [6:0]  v7;
  logic [1:0]  r7;

  residue_gen #(.W(64), .K(3)) dut3 (.value(v64), .residue(r64));
  residue_gen #(.W(7),  .K(2)) dut2 (.value(v7),  .residue(r7));

  task automatic check(input logic [63:0] a, input logic [6:0] b);
    v64 = a; v7 = b;
    #1;
    checks += 2;
    if (r64 != 3'(a % 64'd7)) begin
      failures++;
      $display("FAIL mod7 %h: got %0d exp %0d", a, r64, a % 7);
    end
    if (r7 != 2'(b % 7'd3)) begin
      failures++;
      $display("FAIL mod3 %h: got %0d exp %0d", b, r7, b % 3);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check('0, '0);
    check('1, '1);
    check(64'd7, 7'd3);
    check(64'd49, 7'd6);
    check(64'hFFFF_FFFF_FFFF_FFF8, 7'd126);
    for (int i = 0; i < 2000; i++)
      check({$urandom, $urandom}, 7'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
