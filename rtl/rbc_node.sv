// rbc_node: several rollback chips serving one CPU.
//
// One chip manages one block of version-controlled memory. To give a node
// more state space, NRBC chips sit side by side between the CPU and the
// memory. Each chip manages its own block, and all of them keep one common
// version stack. The node adds three pieces of glue around the chips:
//
//   * Address decoder. Chip i owns the version-controlled and forbidden area
//     that starts at its start address (start_addr of chip i; a reset gives
//     SA_RESET + i x AREA bytes), and a 32-byte register block at
//     CSR_BASE - 32 x i. A request to one of these goes to that chip alone.
//     Every other address is ordinary memory and goes through chip 0.
//   * Broadcast. A write to the RESET, MARK, ROLLBACK or ADVANCE register of
//     any chip goes to all chips at once, each seeing the address of its own
//     register. Every chip therefore holds the same CMF and OMF. The CPU is
//     acknowledged when the last chip has acknowledged, and sees an error if
//     any chip reported one.
//   * Memory arbiter. The chips share one memory bus. Only during a
//     broadcast mark can several chips want it at once (line copies). A free
//     bus goes to the lowest-numbered requesting chip, which keeps it until
//     its transfer is acknowledged.
//
// Interface and timing: the CPU and memory buses are those of rollback_chip,
// with the same req/ack handshake. A request to one chip takes exactly as
// long as it does at that chip. A broadcast takes as long as the slowest
// chip, plus any waits for the memory bus.
//
// Replicating the chip, decoding addresses to pick one, and broadcasting
// reset, mark, rollback and advance to all chips follow the design
// description. The placement of the register blocks, the error merge and
// the memory arbiter are this design's own. With the default NRBC = 1 the
// node is one chip with a pass-through decoder.
module rbc_node
  import rbc_pkg::*;
#(
  parameter int                NRBC       = 1,
  parameter int                ADDR_W     = 24,
  parameter int                DATA_W     = 32,
  parameter int                NMF        = 16,
  parameter int                NLINES     = 16,
  parameter int                LINE_BYTES = 16,
  parameter int                NVRBC      = 1,
  parameter logic [ADDR_W-1:0] SA_RESET   = ADDR_W'('h001000),
  parameter logic [ADDR_W-1:0] CSR_BASE   = ADDR_W'('hFFFFE0),
  localparam int NB   = DATA_W / 8,
  localparam int TW   = (NVRBC > 1) ? $clog2(NVRBC) : 0,
  localparam int AREA = $clog2(LINE_BYTES) + $clog2(NLINES) + $clog2(NMF) + TW,
  localparam int CW   = (NRBC > 1) ? $clog2(NRBC) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  // CPU bus
  input  logic              cpu_req,
  input  logic              cpu_we,
  input  logic [ADDR_W-1:0] cpu_addr,
  input  logic [NB-1:0]     cpu_be,
  input  logic [DATA_W-1:0] cpu_wdata,
  output logic [DATA_W-1:0] cpu_rdata,
  output logic              cpu_ack,
  output logic              cpu_err,
  // memory bus
  output logic              mem_req,
  output logic              mem_we,
  output logic [ADDR_W-1:0] mem_addr,
  output logic [NB-1:0]     mem_be,
  output logic [DATA_W-1:0] mem_wdata,
  input  logic [DATA_W-1:0] mem_rdata,
  input  logic              mem_ack
);

  // per-chip buses
  logic [NRBC-1:0]              c_req, c_ack, c_err;
  logic [NRBC-1:0][ADDR_W-1:0]  c_addr, c_sa;
  logic [NRBC-1:0][DATA_W-1:0]  c_rdata;
  logic [NRBC-1:0]              m_req, m_we, m_ack;
  logic [NRBC-1:0][ADDR_W-1:0]  m_addr;
  logic [NRBC-1:0][NB-1:0]      m_be;
  logic [NRBC-1:0][DATA_W-1:0]  m_wdata;

  // ------------------------------------------------------------ decoder
  logic [NRBC-1:0] sel;          // chips addressed by this request
  logic            bcast;
  logic [4:0]      off;

  assign off = cpu_addr[4:0];

  always_comb begin
    sel   = '0;
    bcast = 1'b0;
    for (int i = 0; i < NRBC; i++) begin
      if (cpu_addr[ADDR_W-1:5] == ADDR_W'(CSR_BASE - ADDR_W'(32 * i)) >> 5) begin
        sel[i] = 1'b1;
        bcast  = cpu_we && (off == CSR_RESET || off == CSR_MARK ||
                            off == CSR_ROLLBACK || off == CSR_ADVANCE);
      end else if (cpu_addr[ADDR_W-1:AREA] == c_sa[i][ADDR_W-1:AREA]) begin
        sel[i] = 1'b1;
      end
    end
    if (bcast)       sel = '1;
    else if (sel == '0) sel[0] = 1'b1;           // ordinary memory
    else begin
      // an address claimed twice (overlapping start addresses) goes to the
      // lowest-numbered chip
      for (int i = NRBC - 1; i >= 0; i--)
        if (sel[i]) sel = NRBC'(1) << i;
    end
  end

  // -------------------------------------------------- request and response
  logic [NRBC-1:0] done_q;       // chips that have answered this request
  logic            err_q;
  logic            all_done;

  assign all_done = ((done_q | c_ack) & sel) == sel;

  always_comb begin
    for (int i = 0; i < NRBC; i++) begin
      c_req[i]  = cpu_req && sel[i] && !done_q[i];
      c_addr[i] = bcast ? {CSR_BASE[ADDR_W-1:5] - (ADDR_W-5)'(i), off} : cpu_addr;
    end
    // like a single chip, the acknowledge does not wait for cpu_req, which
    // the CPU may drop as soon as it sees the acknowledge
    cpu_ack   = (c_ack & sel) != '0 && all_done;
    cpu_err   = cpu_ack && (err_q || (c_err & c_ack) != '0);
    cpu_rdata = '0;
    for (int i = 0; i < NRBC; i++)
      if (sel[i]) cpu_rdata = c_rdata[i];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      done_q <= '0;
      err_q  <= 1'b0;
    end else if (cpu_ack) begin
      done_q <= '0;
      err_q  <= 1'b0;
    end else begin
      done_q <= done_q | (c_ack & sel);
      err_q  <= err_q || (c_err & c_ack) != '0;
    end
  end

  // ------------------------------------------------------- memory arbiter
  logic          own_q;          // the bus is held by chip owner_q
  logic [CW-1:0] owner_q, grant;

  always_comb begin
    grant = owner_q;
    if (!own_q) begin
      grant = '0;
      for (int i = NRBC - 1; i >= 0; i--)
        if (m_req[i]) grant = CW'(i);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      own_q   <= 1'b0;
      owner_q <= '0;
    end else if (mem_ack) begin
      own_q   <= 1'b0;
    end else if (mem_req) begin
      own_q   <= 1'b1;
      owner_q <= grant;
    end
  end

  assign mem_req   = m_req[grant];
  assign mem_we    = m_we[grant];
  assign mem_addr  = m_addr[grant];
  assign mem_be    = m_be[grant];
  assign mem_wdata = m_wdata[grant];

  always_comb
    for (int i = 0; i < NRBC; i++) m_ack[i] = mem_ack && (grant == CW'(i));

  // ----------------------------------------------------------------- chips
  for (genvar i = 0; i < NRBC; i++) begin : g_chip
    rollback_chip #(
      .ADDR_W(ADDR_W), .DATA_W(DATA_W), .NMF(NMF), .NLINES(NLINES),
      .LINE_BYTES(LINE_BYTES), .NVRBC(NVRBC),
      .SA_RESET(ADDR_W'(SA_RESET + (ADDR_W'(i) << AREA))),
      .CSR_BASE(ADDR_W'(CSR_BASE - ADDR_W'(32 * i)))
    ) u_chip (
      .clk, .rst_n,
      .cpu_req(c_req[i]), .cpu_we, .cpu_addr(c_addr[i]), .cpu_be, .cpu_wdata,
      .cpu_rdata(c_rdata[i]), .cpu_ack(c_ack[i]), .cpu_err(c_err[i]),
      .start_addr(c_sa[i]),
      .mem_req(m_req[i]), .mem_we(m_we[i]), .mem_addr(m_addr[i]), .mem_be(m_be[i]),
      .mem_wdata(m_wdata[i]), .mem_rdata, .mem_ack(m_ack[i])
    );
  end

  // The bus stays with one chip for the whole of a transfer.
  a_owner_stable: assert property (@(posedge clk) disable iff (!rst_n)
      mem_req && !mem_ack |=> mem_req && grant == $past(grant));

endmodule
