// tb_icache_pkg: helpers shared by the testbenches.
//
// instr_of() defines the program image held by the L2 model: the 32-bit word
// at byte address a is a fixed hash of a, so a testbench can predict every
// fetched instruction without storing a program.
package tb_icache_pkg;
  function automatic logic [31:0] instr_of(input logic [31:0] a);
    logic [31:0] w;
    w = {2'b00, a[31:2]};
    return (w * 32'h9E37_79B1) ^ 32'h1234_5678;
  endfunction

  // the 64-bit AXI beat at 8-byte aligned address a
  function automatic logic [63:0] beat_of(input logic [31:0] a);
    return {instr_of({a[31:3], 3'b100}), instr_of({a[31:3], 3'b000})};
  endfunction

  // the 256-bit line holding byte address a
  function automatic logic [255:0] line_of(input logic [31:0] a);
    logic [255:0] l;
    for (int unsigned k = 0; k < 8; k++) l[k*32 +: 32] = instr_of({a[31:5], 5'b0} + 32'(4*k));
    return l;
  endfunction
endpackage
