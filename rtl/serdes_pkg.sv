// serdes_pkg: constants and helpers shared by the serializer tree.
//
// SER_WIDTH is the parallel word width (8 bits, D1..D8). The tree of 2:1
// cells has log2(SER_WIDTH) levels. Because every 2:1 cell sends its first
// input before its second, and every level interleaves the streams of the
// level below, the parallel bit that a first-level cell receives is the
// bit-reversed index of that cell: bit_rev() gives that mapping.
package serdes_pkg;

  parameter int unsigned SER_WIDTH = 8;

  // Reverse the lowest nbits bits of v.
  function automatic int unsigned bit_rev(input int unsigned v, input int unsigned nbits);
    int unsigned r;
    r = 0;
    for (int unsigned i = 0; i < nbits; i++) begin
      r = (r << 1) | ((v >> i) & 1);
    end
    return r;
  endfunction

endpackage
