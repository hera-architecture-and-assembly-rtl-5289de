// hera_mem: word-addressed memory of the HERA processor.
//
// The architecture addresses 2^16 words of 16 bits, so the default is
// AW = 16, DW = 16 (64 Ki words). One port: a write of wdata to addr when we
// is high, and a synchronous read, so rdata shows the word at the address
// presented in the previous cycle (write-first: a write returns the new
// word). This maps onto an on-chip block RAM. Contents are not reset.
module hera_mem #(
  parameter int unsigned AW = 16,
  parameter int unsigned DW = 16
) (
  input  logic          clk,
  input  logic [AW-1:0] addr,
  input  logic          we,
  input  logic [DW-1:0] wdata,
  output logic [DW-1:0] rdata
);

  logic [DW-1:0] mem [2**AW];

  always_ff @(posedge clk) begin
    if (we) begin
      mem[addr] <= wdata;
      rdata     <= wdata;
    end else begin
      rdata <= mem[addr];
    end
  end

endmodule
