// hist_pkg: sizes and types shared by the streaming histogram accelerator.
//
// The accelerator builds a 256-bin histogram of 8-bit pixels. Input data is
// read from global memory as 512-bit vectors (an int16 OpenCL vector, 64 bytes,
// so 64 pixels per beat), and each bin counter is a 32-bit int. A pixel's
// bin is its value divided by the bin width, a power of two (find_index). These defaults
// are the numbers of the design; the address width and burst length are this
// implementation's own choices.
package hist_pkg;

  // Histogram geometry
  localparam int unsigned BIN_SIZE = 256;  // number of fixed-width bins
  localparam int unsigned PIX_W    = 8;    // pixel width; pixel value is the bin index
  localparam int unsigned COUNT_W  = 32;   // width of one bin counter (OpenCL int)

  // Memory side
  localparam int unsigned BUS_W    = 512;  // one int16 vector per beat
  localparam int unsigned ADDR_W   = 64;   // byte address into global memory
  localparam int unsigned LEN_W    = 8;    // burst length field, beats - 1
  localparam int unsigned BEATS_W  = 32;   // width of a beat count

  // findIndex of a fixed-width histogram whose bins are 2**shift values wide:
  // the bin index is the pixel value without its low `shift` bits.
  function automatic int unsigned find_index(input int unsigned value, input int unsigned shift);
    return value >> shift;
  endfunction

  // Kernel state of the Hist kernel
  typedef enum logic [2:0] {
    H_IDLE,   // waiting for start
    H_CLEAR,  // writing zero into every bin of every bin array
    H_ACCUM,  // consuming pipes and updating bins
    H_DRAIN,  // letting the last read-modify-writes complete
    H_MERGE,  // summing the bin arrays and copying the result out
    H_DONE    // one-cycle done pulse
  } hist_state_e;

endpackage
