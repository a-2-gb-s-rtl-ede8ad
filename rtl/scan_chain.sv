// scan_chain: serial configuration register.
//
// While scan_en is high the W-bit shift register takes scan_in at its top
// bit and moves towards bit 0 one bit per clock. scan_out is bit 0, so
// chains can be cascaded and the contents read back. A pulse on
// scan_update copies the shift register into the configuration register
// `cfg`, which drives the chip. The configuration therefore never changes
// while bits are moving. Reset clears both registers.
//
// Timing: shifting W bits takes W clocks with scan_en high, and `cfg`
// changes on the clock edge where scan_update is high.
//
// Configuring the operating mode and the delay-line offsets through a scan
// chain follows the source design. The shift/update split and the bit
// order are this design's choices.
module scan_chain #(
  parameter int unsigned W = 8
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         scan_en,
  input  logic         scan_in,
  input  logic         scan_update,
  output logic         scan_out,
  output logic [W-1:0] cfg
);

  logic [W-1:0] sr;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      sr  <= '0;
      cfg <= '0;
    end else begin
      if (scan_en)     sr  <= {scan_in, sr[W-1:1]};
      if (scan_update) cfg <= sr;
    end
  end

  assign scan_out = sr[0];

endmodule
