// Self-checking testbench for compressor42 (the selectable cell).
// One instance per cell kind, all 32 input patterns, outputs compared with
// the published truth tables of the exact compressor, Design 1 and
// Design 2 (masks indexed by {cin,x4,x3,x2,x1}).  For Design 2, which has
// no carry-in, the table is the same for both values of cin and cout is 0.
module tb_compressor42;
  import cmp42_pkg::*;

  localparam logic [31:0] E_COUT  = 32'he8e8e8e8;
  localparam logic [31:0] E_CARRY = 32'hff969600;
  localparam logic [31:0] E_SUM   = 32'h96696996;
  localparam logic [31:0] D1_COUT  = 32'heee0eee0;
  localparam logic [31:0] D1_CARRY = 32'hffff0000;
  localparam logic [31:0] D1_SUM   = 32'h0000f99f;
  localparam logic [31:0] D2_CARRY = 32'heee0eee0;
  localparam logic [31:0] D2_SUM   = 32'hf99ff99f;

  logic x1, x2, x3, x4, cin;
  logic [2:0] se, s1, s2;   // {cout, carry, sum} of each kind
  int checks = 0, failures = 0;

  compressor42 #(.KIND(CMP_EXACT)) u_e (.x1, .x2, .x3, .x4, .cin,
    .sum(se[0]), .carry(se[1]), .cout(se[2]));
  compressor42 #(.KIND(CMP_D1)) u_1 (.x1, .x2, .x3, .x4, .cin,
    .sum(s1[0]), .carry(s1[1]), .cout(s1[2]));
  compressor42 #(.KIND(CMP_D2)) u_2 (.x1, .x2, .x3, .x4, .cin,
    .sum(s2[0]), .carry(s2[1]), .cout(s2[2]));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string name, logic [2:0] got, logic [2:0] exp, int i);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s in=%05b got=%03b exp=%03b", name, 5'(i), got, exp);
    end
  endtask

  initial begin
    for (int i = 0; i < 32; i++) begin
      {cin, x4, x3, x2, x1} = 5'(i);
      #1;
      check("exact", se, {E_COUT[i], E_CARRY[i], E_SUM[i]}, i);
      check("d1", s1, {D1_COUT[i], D1_CARRY[i], D1_SUM[i]}, i);
      check("d2", s2, {1'b0, D2_CARRY[i], D2_SUM[i]}, i);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
