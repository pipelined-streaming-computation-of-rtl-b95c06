// tb_data_pkg: test-data generator shared by the testbenches.
//
// Pixel values are a pure function of the byte address, a data pattern and a
// seed, so a memory model can produce any byte on demand and a testbench can
// work out the expected histogram independently of the design.
// Patterns:
//   PAT_UNIFORM  every pixel drawn uniformly from 0..255 (a hash of the address)
//   PAT_DARK     locally invariant data: a black background (value 0) with one
//                pixel in 64 drawn at random, like a night image
//   PAT_CONST    every pixel has the same value (seed[7:0])
package tb_data_pkg;

  typedef enum int {PAT_UNIFORM = 0, PAT_DARK = 1, PAT_CONST = 2} pattern_e;

  function automatic logic [31:0] mix32(input logic [63:0] x);
    logic [63:0] z;
    z = x + 64'h9E3779B97F4A7C15;
    z = (z ^ (z >> 30)) * 64'hBF58476D1CE4E5B9;
    z = (z ^ (z >> 27)) * 64'h94D049BB133111EB;
    z = z ^ (z >> 31);
    return z[31:0];
  endfunction

  function automatic logic [7:0] pixel(input logic [63:0] byte_addr,
                                       input pattern_e pat,
                                       input logic [31:0] seed);
    logic [31:0] h;
    h = mix32(byte_addr ^ {seed, 32'h0});
    case (pat)
      PAT_UNIFORM: return h[7:0];
      PAT_DARK:    return (h[13:8] == 6'd0) ? h[7:0] : 8'd0;
      default:     return seed[7:0];
    endcase
  endfunction

endpackage
