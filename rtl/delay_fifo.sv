// delay_fifo: fixed-length FIFO delay line.
//
// Every cycle with `en` high the line takes one word `din` and, in the same
// cycle, presents on `dout` the word it took DEPTH enables earlier. It is a
// circular buffer: one pointer addresses the word that is read (old contents)
// and then overwritten. Until DEPTH words have been taken after reset, `dout`
// is 0, so the line behaves as if it had been filled with zeros; the
// memory itself is never cleared, which lets it map onto block RAM.
//
// The stereo processor uses this FIFO for its image line delays
// (DEPTH = (2m+1) lines of pixels) and for the column sums of a correlator
// (one line, and 2n+1 columns). `dout` is combinational from the memory
// and the pointer (asynchronous read), it does not depend on `din`.
//
// The architecture calls for FIFO memories in these places; the circular
// buffer form and the zero-until-filled start are choices of this design.
module delay_fifo #(
  parameter int unsigned W     = 8,    // word width
  parameter int unsigned DEPTH = 256   // delay in enabled cycles, at least 1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  input  logic [W-1:0] din,
  output logic [W-1:0] dout
);

  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [W-1:0]  mem [DEPTH];
  logic [AW-1:0] ptr;
  logic          primed;  // DEPTH words have been taken since reset

  assign dout = primed ? mem[ptr] : '0;

  always_ff @(posedge clk) begin
    if (en) mem[ptr] <= din;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ptr    <= '0;
      primed <= 1'b0;
    end else if (en) begin
      if (ptr == AW'(DEPTH - 1)) begin
        ptr    <= '0;
        primed <= 1'b1;
      end else begin
        ptr <= ptr + 1'b1;
      end
    end
  end

  initial assert (DEPTH >= 1) else $error("delay_fifo: DEPTH must be at least 1");

endmodule
