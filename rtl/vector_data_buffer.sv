// vector_data_buffer: staging store for vector data entering and leaving the
// substring, one 32-bit word per APE.
//
// It lets the sequential input and output of vector data overlap with
// parallel processing. Towards the outside it is a byte-wide shift register
// of 4*N bytes: each clock with shift=1 the byte nearest the output end
// (APE 0's least significant byte) leaves on vout while vin enters at the
// far end (APE N-1's most significant byte), so after 4*N shifts the first
// byte in sits in APE 0's least significant byte. Output of old results and
// input of new operands happen in the same shifts. At one byte per clock
// this is 40 Mbytes/s at 40 MHz.
// Towards the APEs it is parallel: words[i] is APE i's word (the APEs load
// it on a VLOAD step) and a capture pulse copies every APE's word in (the
// VSTORE step). Capture wins over a shift in the same cycle.
//
// The source shows the buffer and its place between the outside and the
// inter-APE network and gives the 40 Mbytes/s I/O rate; the byte width,
// the shift organisation and the one-word-per-APE depth are this design's
// own choice.
module vector_data_buffer
  import asp_pkg::*;
#(
  parameter int unsigned N = 64,
  parameter int unsigned W = DBUS_W
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 shift,
  input  logic [VBYTE_W-1:0]   vin,
  output logic [VBYTE_W-1:0]   vout,
  input  logic                 capture,
  input  logic [N-1:0][W-1:0]  cap_words,
  output logic [N-1:0][W-1:0]  words
);
  localparam int unsigned BPW = W / VBYTE_W;  // bytes per word
  localparam int unsigned NB  = N * BPW;

  logic [NB-1:0][VBYTE_W-1:0] buf_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      buf_q <= '0;
    end else if (capture) begin
      buf_q <= cap_words;
    end else if (shift) begin
      buf_q <= {vin, buf_q[NB-1:1]};
    end
  end

  assign vout  = buf_q[0];
  assign words = buf_q;
endmodule
