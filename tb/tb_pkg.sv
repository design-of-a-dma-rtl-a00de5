// tb_pkg: helpers shared by the testbenches.
//
// pattern() gives the 32-bit word the SDRAM model returns for a byte address.
// It is a fixed scramble of the word address, so every word of a frame is
// different and a testbench can work out the expected pixel from the screen
// position alone: pixel x of row y of frame f lies in the word at byte
// address base + f*img_size + y*row_bytes + (x/2)*4, low half for even x.
package tb_pkg;

  function automatic logic [31:0] pattern(input logic [31:0] byte_addr);
    logic [31:0] w;
    w = byte_addr >> 2;
    return (w * 32'h9E37_79B1) ^ (w << 16) ^ 32'h1234_5678;
  endfunction

  function automatic logic [15:0] pixel_at(input logic [31:0] base, input int f,
                                           input int img_size, input int row_bytes,
                                           input int x, input int y);
    logic [31:0] word;
    word = pattern(base + 32'(f * img_size + y * row_bytes + (x / 2) * 4));
    return (x % 2 == 0) ? word[15:0] : word[31:16];
  endfunction

endpackage
