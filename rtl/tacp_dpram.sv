// tacp_dpram: one of the TACP's three identical dual-port byte memories
// (instruction, test-data and test-result memory).
//
// Port a reads and writes, port b only reads. Both ports are synchronous:
// the address presented in a cycle is registered at the clock edge, and the
// data output then shows the byte at that address for the next cycle
// (port a shows the written byte after a write). The users of this memory
// present the value their address register takes at the same edge, so the
// outputs always show the byte at the register's current address, and a
// write lands at the address the register moves to. Depth 2**ADDR_W bytes
// with the 16-bit address ports of the published design.
module tacp_dpram #(
  parameter int unsigned ADDR_W = 16,
  parameter int unsigned DATA_W = 8
) (
  input  logic              clk,
  input  logic [ADDR_W-1:0] addr_a,
  input  logic              we_a,
  input  logic [DATA_W-1:0] din_a,
  output logic [DATA_W-1:0] dout_a,
  input  logic [ADDR_W-1:0] addr_b,
  output logic [DATA_W-1:0] dout_b
);

  logic [DATA_W-1:0] mem [2**ADDR_W];

  always_ff @(posedge clk) begin
    if (we_a) begin
      mem[addr_a] <= din_a;
      dout_a      <= din_a;
    end else begin
      dout_a      <= mem[addr_a];
    end
    dout_b <= mem[addr_b];
  end

endmodule
