// mem_model: behavioural main memory for testbenches. WORDS 32-bit words,
// word-addressed by addr[.. :2] modulo WORDS; a request held on req is
// acknowledged after LAT cycles; writes honour byte enables. Contents start
// as a function of the address so that reads are predictable: word i
// holds i * 32'h9e3779b1.
module mem_model #(
  parameter int unsigned WORDS = 4096,
  parameter int unsigned LAT   = 3
) (
  input  logic        clk,
  input  logic        req,
  input  logic        we,
  input  logic [31:0] addr,
  input  logic [31:0] wdata,
  input  logic [3:0]  be,
  output logic [31:0] rdata,
  output logic        ack
);
  logic [31:0] mem [WORDS];
  int cnt = 0;
  initial for (int i = 0; i < WORDS; i++) mem[i] = 32'(i) * 32'h9e3779b1;

  always @(posedge clk) begin
    ack <= 1'b0;
    if (req && !ack) begin
      if (cnt == LAT - 1) begin
        cnt <= 0;
        ack <= 1'b1;
        if (we) begin
          for (int b = 0; b < 4; b++)
            if (be[b]) mem[(addr >> 2) % WORDS][8*b +: 8] <= wdata[8*b +: 8];
        end else begin
          rdata <= mem[(addr >> 2) % WORDS];
        end
      end else begin
        cnt <= cnt + 1;
      end
    end
  end
  initial ack = 1'b0;
  initial rdata = '0;
endmodule
