// reset_sync: brings an asynchronous reset into one clock domain.
//
// Reset asserts at once and is released on the second clock edge after the
// input goes low. Interface: clk, arst_in (active high); rst_out.
module reset_sync (
  input  logic clk,
  input  logic arst_in,
  output logic rst_out
);
  logic r1;
  always_ff @(posedge clk or posedge arst_in) begin
    if (arst_in) begin
      r1      <= 1'b1;
      rst_out <= 1'b1;
    end else begin
      r1      <= 1'b0;
      rst_out <= r1;
    end
  end
endmodule
