// Payload source ROM. Holds a fixed pseudo-random sequence of 6-bit words,
// one word per payload resource element (the mapper uses the low 2, 4 or 6
// bits). Because the content never changes, a receiver holding the same ROM
// can count bit errors. The content is produced at initialisation by a
// 16-bit Fibonacci LFSR (x^16 + x^14 + x^13 + x^11 + 1, seed 0xACE1), stepped
// 6 times per word; the generator polynomial and seed are this design's
// choice. Synchronous read: rdata is valid one cycle after addr.
module payload_rom #(
  parameter int DEPTH = 2048,
  parameter int AW    = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic [AW-1:0] addr,
  output logic [5:0]    rdata
);
  logic [5:0] mem [DEPTH];

  initial begin
    logic [15:0] s;
    s = 16'hACE1;
    for (int i = 0; i < DEPTH; i++) begin
      for (int b = 0; b < 6; b++) begin
        mem[i][b] = s[0];
        s = {s[0] ^ s[2] ^ s[3] ^ s[5], s[15:1]};
      end
    end
  end

  always_ff @(posedge clk) rdata <= mem[addr];
endmodule
