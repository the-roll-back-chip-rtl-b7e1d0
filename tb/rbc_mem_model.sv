// rbc_mem_model: behavioural model of the node memory behind the rollback
// chip (testbench only).
//
// Word-wide memory with byte enables, stored sparsely (unwritten words read
// as zero). A request held on req is served LAT clock cycles after it is
// first seen and acknowledged with a one-cycle ack; read data is valid with
// ack. Also counts reads and writes for the testbenches.
module rbc_mem_model #(
  parameter int ADDR_W = 24,
  parameter int DATA_W = 32,
  parameter int LAT    = 1
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  req,
  input  logic                  we,
  input  logic [ADDR_W-1:0]     addr,
  input  logic [DATA_W/8-1:0]   be,
  input  logic [DATA_W-1:0]     wdata,
  output logic [DATA_W-1:0]     rdata,
  output logic                  ack
);
  localparam int DBW = $clog2(DATA_W / 8);

  logic [DATA_W-1:0] mem [logic [ADDR_W-1:0]];
  int cnt;
  int n_reads, n_writes;

  function automatic logic [DATA_W-1:0] peek(input logic [ADDR_W-1:0] a);
    logic [ADDR_W-1:0] w;
    w = a >> DBW;
    return mem.exists(w) ? mem[w] : '0;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ack      <= 1'b0;
      rdata    <= '0;
      cnt      <= 0;
      n_reads  <= 0;
      n_writes <= 0;
    end else begin
      ack <= 1'b0;
      if (req && !ack) begin
        if (cnt >= LAT - 1) begin
          logic [ADDR_W-1:0] w;
          logic [DATA_W-1:0] d;
          w = addr >> DBW;
          d = mem.exists(w) ? mem[w] : '0;
          cnt <= 0;
          ack <= 1'b1;
          if (we) begin
            for (int b = 0; b < DATA_W / 8; b++)
              if (be[b]) d[b*8 +: 8] = wdata[b*8 +: 8];
            mem[w] = d;
            n_writes <= n_writes + 1;
          end else begin
            rdata   <= d;
            n_reads <= n_reads + 1;
          end
        end else begin
          cnt <= cnt + 1;
        end
      end
    end
  end
endmodule
