// cnn_pkg: widths and sizes shared by the row-oriented pipeline convolution
// accelerator. The kernel size (3x3) and the largest map width (128, the
// 128x128 input of the first MobileNet layer) are the design's reference
// configuration; the number widths are this design's own choice (signed
// integers, binary point left to the user).
package cnn_pkg;
  localparam int unsigned DATA_W = 16;  // input-map and kernel elements
  localparam int unsigned ACC_W  = 32;  // depth-wise partial sums and results
  localparam int unsigned PW_W   = 48;  // point-wise results
  localparam int unsigned KS     = 3;   // kernel rows and columns
  localparam int unsigned MAX_F  = 128; // largest map width and height

  // Controller states of one channel plane.
  typedef enum logic [2:0] {
    ST_IDLE,   // waiting for start
    ST_CLEAR,  // zero the buffer (rows above the map)
    ST_SHIFT,  // shift the FIFOs up, last FIFO zeroed
    ST_LOAD,   // fetch one row into the last FIFO
    ST_PASS,   // one row pass of F+2 cycles through the MAC columns
    ST_DRAIN   // wait until the last results have left the pipeline
  } ctrl_state_t;
endpackage
