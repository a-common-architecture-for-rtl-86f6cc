// tb_ref_pkg: reference models used by the testbenches.
//
// alu_ref computes the documented ALU operations from the operation numbers
// directly (written independently of the RTL's case statement), returning
// {carry, result}. The operation numbers are those of modsimd_pkg.
package tb_ref_pkg;

  function automatic logic [16:0] alu_ref(int op, logic [15:0] a, logic [15:0] b,
                                          logic [15:0] prev);
    logic [16:0] r;
    if (op == 0)                     r = 17'(a) + 17'(b);
    else if (op >= 1 && op <= 3)     r = {1'b0, a};
    else if (op == 4)                r = {a >= b, 16'(a - b)};
    else if (op == 5)                r = {a[15], a[14:0], 1'b0};
    else if (op == 6)                r = {a[0], 1'b0, a[15:1]};
    else if (op == 7)                r = 17'h0;
    else if (op == 8)                r = {1'b0, a & b};
    else if (op == 9)                r = {1'b0, (a ^ 16'hFFFF) & b};
    else if (op == 10)               r = {1'b0, b};
    else if (op == 11)               r = {1'b0, 16'hFFFF ^ (a | b)};
    else if (op == 12)               r = {1'b0, (a & b) | ((a ^ 16'hFFFF) & (b ^ 16'hFFFF))};
    else if (op == 13)               r = {1'b0, 16'hFFFF - a};
    else if (op == 14)               r = {1'b0, (a ^ 16'hFFFF) | b};
    else if (op == 15)               r = {1'b0, a & (b ^ 16'hFFFF)};
    else if (op == 16)               r = {1'b0, (a | b) & ~(a & b)};
    else if (op == 17)               r = {1'b0, a | b};
    else if (op == 18)               r = {1'b0, 16'hFFFF - b};
    else if (op == 19)               r = {1'b0, a | (b ^ 16'hFFFF)};
    else if (op == 20)               r = {1'b0, 16'hFFFF ^ (a & b)};
    else if (op == 21)               r = {1'b0, 16'hFFFF};
    else                             r = {1'b0, prev};
    return r;
  endfunction

endpackage
