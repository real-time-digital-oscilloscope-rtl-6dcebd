// picture_memory_model: behavioural model of the external picture memory,
// for testbenches. 64 KiB of bytes, synchronous: a read (rd) returns the byte
// on rdata one clk later; a write (we) stores wdata at the clk edge. Reads and
// writes in the same clk are flagged as an error count (collisions). Contents
// start as byte(a) = (a * 7 + a / 128) mod 256.
module picture_memory_model (
  input  logic        clk,
  input  logic [15:0] addr,
  input  logic        rd,
  input  logic        we,
  input  logic [7:0]  wdata,
  output logic [7:0]  rdata,
  output int          collisions,
  output int          reads,
  output int          writes
);
  logic [7:0] mem [65536];

  initial begin
    for (int a = 0; a < 65536; a++) mem[a] = 8'((a * 7 + a / 128) % 256);
    rdata = '0;
    collisions = 0;
    reads = 0;
    writes = 0;
  end

  always @(posedge clk) begin
    if (rd && we) collisions++;
    if (rd) begin rdata <= mem[addr]; reads++; end
    if (we) begin mem[addr] = wdata; writes++; end
  end

  function automatic logic [7:0] peek(input logic [15:0] a);
    return mem[a];
  endfunction
endmodule
