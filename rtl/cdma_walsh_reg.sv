// cdma_walsh_reg - register file holding the eight spread codes.
//
// Both the transmitter and the receiver read their spread codes from a small
// register rather than from fixed wiring. Reset loads the length-8 Walsh set
// a..h (slot 0 = "a" ... slot 7 = "h"). Rewriting a slot changes which code a
// channel uses; doing the same write on both ends of a link moves a channel
// to another code in real time, which is how bandwidth is re-assigned between
// data streams that share several channels.
//
// Interface: one synchronous write port (we, waddr, wdata); all eight codes
// are always visible on `codes`. A write takes effect at the next clock edge.
// The register organisation and write port are this design's choice; the
// document only names a Walsh code register.
module cdma_walsh_reg
  import cdma_pkg::*;
(
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   we,
  input  logic [2:0]             waddr,
  input  code_t                  wdata,
  output code_t [0:N_CODES-1]    codes
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  codes <= WALSH_SET;
    else if (we) codes[waddr] <= wdata;
  end

endmodule
