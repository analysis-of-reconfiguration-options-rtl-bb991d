// config_shift_register - serial configuration register of the chip.
//
// The configuration bitstream is shifted in one bit per clock while
// shift_en is high; its bits drive the block multiplexers directly (there is
// no shadow copy, following the source design's plain shift register). The
// new bit enters at the top, bit LEN-1, and everything moves one place
// towards bit 0, so after LEN shifts the first bit sent sits in bit 0. The
// bit falling off bit 0 appears on conf_out, which allows read-back or
// chaining; that output and the asynchronous active-low reset to all zeros
// are this design's choices. Loading a full configuration takes LEN clocks.
module config_shift_register #(
  parameter int unsigned LEN = 624
) (
  input  logic           clk,
  input  logic           rst_n,     // asynchronous reset, clears all bits
  input  logic           shift_en,  // shift one bit in this clock
  input  logic           conf_in,   // serial configuration data
  output logic           conf_out,  // bit shifted out of bit 0
  output logic [LEN-1:0] cfg        // parallel configuration bits
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        cfg <= '0;
    else if (shift_en) cfg <= {conf_in, cfg[LEN-1:1]};
  end

  assign conf_out = cfg[0];

endmodule
