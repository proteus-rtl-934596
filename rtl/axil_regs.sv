// axil_regs: AXI4-Lite register interface of the NoC.
//
// A host programs the synthetic traffic and reads the statistics of every
// node through this 32-bit AXI4-Lite slave. Byte addresses:
//   0x000 CTRL       rw  bit0 traffic generators on; writing 1 to bit1
//                        clears all statistics, to bit2 the deadlock flags
//   0x004 RATE       rw  injection rate, packets/node/cycle * 65536
//   0x008 PATTERN    rw  destination pattern (pattern_e)
//   0x00C PKT_LEN    rw  packet length in flits
//   0x010 DL_THRESH  rw  deadlock threshold in cycles (0 = off)
//   0x014 STATUS     ro  bit0 some router reported deadlock
//   0x018 CYCLES     ro  free-running cycle counter
//   0x01C NODES      ro  number of nodes
//   0x1000 + 0x40*n  node n: +0x00 packets sent, +0x04 packets received,
//       +0x08 flits received, +0x0C sum of network latency, +0x10 sum of
//       queuing latency, +0x14 largest network latency, +0x18 average
//       network latency, +0x1C average queuing latency, +0x20 deadlock flag
//       of its router, +0x24 packets generated, +0x28 packets not created
//       because the generator was still holding one.
// A read of an average starts a sequential divider (sum / packets
// received): its data come 34 cycles after the address handshake; every
// other read answers one cycle after it; R then waits for RREADY. A new
// address is taken only after the previous data were accepted. A write
// needs AW and W together. Unmapped addresses answer
// SLVERR; writes to read-only registers are ignored.
//
// That the statistics sit in AXI-readable registers, averages included,
// follows the document; the map, the configuration registers and the
// divider are this design's.
module axil_regs
  import noc_pkg::*;
#(
  parameter int NUM_NODES = 16,
  parameter int ADDR_W    = 20
) (
  input  logic              clk,
  input  logic              rst_n,
  // AXI4-Lite slave
  input  logic [ADDR_W-1:0] s_awaddr,
  input  logic              s_awvalid,
  output logic              s_awready,
  input  logic [31:0]       s_wdata,
  input  logic [3:0]        s_wstrb,
  input  logic              s_wvalid,
  output logic              s_wready,
  output logic [1:0]        s_bresp,
  output logic              s_bvalid,
  input  logic              s_bready,
  input  logic [ADDR_W-1:0] s_araddr,
  input  logic              s_arvalid,
  output logic              s_arready,
  output logic [31:0]       s_rdata,
  output logic [1:0]        s_rresp,
  output logic              s_rvalid,
  input  logic              s_rready,
  // configuration
  output logic              tg_enable,
  output logic [15:0]       rate,
  output pattern_e          pattern,
  output logic [7:0]        pkt_len,
  output logic [15:0]       dl_threshold,
  output logic              stats_clear,
  output logic              dl_clear,
  // status
  input  node_stats_t       stats [NUM_NODES],
  input  logic [31:0]       cycles
);
  localparam logic [1:0] OKAY = 2'b00, SLVERR = 2'b10;

  // ---------------- writes ----------------
  logic wr_go;
  assign wr_go     = s_awvalid && s_wvalid && !s_bvalid;
  assign s_awready = wr_go;
  assign s_wready  = wr_go;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tg_enable    <= 1'b0;
      rate         <= '0;
      pattern      <= PAT_RANDOM;
      pkt_len      <= 8'd1;
      dl_threshold <= '0;
      stats_clear  <= 1'b0;
      dl_clear     <= 1'b0;
      s_bvalid     <= 1'b0;
      s_bresp      <= OKAY;
    end else begin
      stats_clear <= 1'b0;
      dl_clear    <= 1'b0;
      if (s_bvalid && s_bready) s_bvalid <= 1'b0;
      if (wr_go) begin
        s_bvalid <= 1'b1;
        s_bresp  <= OKAY;
        if (s_wstrb[0] || s_wstrb[1]) begin
          unique case (s_awaddr)
            ADDR_W'('h000): begin
              tg_enable   <= s_wdata[0];
              stats_clear <= s_wdata[1];
              dl_clear    <= s_wdata[2];
            end
            ADDR_W'('h004): rate         <= s_wdata[15:0];
            ADDR_W'('h008): pattern      <= pattern_e'(s_wdata[2:0]);
            ADDR_W'('h00C): pkt_len      <= s_wdata[7:0];
            ADDR_W'('h010): dl_threshold <= s_wdata[15:0];
            default:        s_bresp      <= (s_awaddr < ADDR_W'('h020)) ? OKAY : SLVERR;
          endcase
        end
      end
    end
  end

  // ---------------- reads ----------------
  logic        rd_wait;     // waiting for the divider
  logic        div_start, div_busy, div_done;
  logic [31:0] div_a, div_b, div_q;
  logic        dl_any;

  always_comb begin
    dl_any = 1'b0;
    for (int n = 0; n < NUM_NODES; n++) dl_any |= stats[n].deadlock;
  end

  // decode of the read address
  logic [31:0] rd_val;
  logic [1:0]  rd_resp;
  logic        rd_avg;
  always_comb begin
    int node, r;
    rd_val    = '0;
    rd_resp   = OKAY;
    rd_avg    = 1'b0;
    div_a     = '0;
    div_b     = '0;
    node      = 0;
    r         = 0;
    if (s_araddr < ADDR_W'('h1000)) begin
      unique case (s_araddr)
        ADDR_W'('h000): rd_val = {31'b0, tg_enable};
        ADDR_W'('h004): rd_val = {16'b0, rate};
        ADDR_W'('h008): rd_val = {29'b0, pattern};
        ADDR_W'('h00C): rd_val = {24'b0, pkt_len};
        ADDR_W'('h010): rd_val = {16'b0, dl_threshold};
        ADDR_W'('h014): rd_val = {31'b0, dl_any};
        ADDR_W'('h018): rd_val = cycles;
        ADDR_W'('h01C): rd_val = 32'(NUM_NODES);
        default:        rd_resp = SLVERR;
      endcase
    end else begin
      node = (int'(s_araddr) - 'h1000) >> 6;
      r    = (int'(s_araddr) >> 2) & 'hF;
      if (node >= NUM_NODES) rd_resp = SLVERR;
      else begin
        unique case (r)
          0:  rd_val = stats[node].pkts_sent;
          1:  rd_val = stats[node].pkts_recv;
          2:  rd_val = stats[node].flits_recv;
          3:  rd_val = stats[node].sum_net_lat;
          4:  rd_val = stats[node].sum_queue_lat;
          5:  rd_val = stats[node].max_net_lat;
          6:  begin rd_avg = 1'b1; div_a = stats[node].sum_net_lat;   div_b = stats[node].pkts_recv; end
          7:  begin rd_avg = 1'b1; div_a = stats[node].sum_queue_lat; div_b = stats[node].pkts_recv; end
          8:  rd_val = {31'b0, stats[node].deadlock};
          9:  rd_val = stats[node].generated;
          10: rd_val = stats[node].dropped;
          default: rd_resp = SLVERR;
        endcase
      end
    end
  end

  assign s_arready = !s_rvalid && !rd_wait;
  assign div_start = s_arvalid && s_arready && rd_avg;

  seq_divider #(.W(32)) u_div (
    .clk, .rst_n, .start(div_start), .dividend(div_a), .divisor(div_b),
    .busy(div_busy), .done(div_done), .quotient(div_q)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s_rvalid <= 1'b0;
      s_rdata  <= '0;
      s_rresp  <= OKAY;
      rd_wait  <= 1'b0;
    end else begin
      if (s_rvalid && s_rready) s_rvalid <= 1'b0;
      if (s_arvalid && s_arready) begin
        if (rd_avg) rd_wait <= 1'b1;
        else begin
          s_rvalid <= 1'b1;
          s_rdata  <= rd_val;
          s_rresp  <= rd_resp;
        end
      end
      if (rd_wait && div_done) begin
        rd_wait  <= 1'b0;
        s_rvalid <= 1'b1;
        s_rdata  <= div_q;
        s_rresp  <= OKAY;
      end
    end
  end

  a_bvalid_hold: assert property (@(posedge clk) disable iff (!rst_n)
                                  (s_bvalid && !s_bready) |=> s_bvalid);
  a_rvalid_hold: assert property (@(posedge clk) disable iff (!rst_n)
                                  (s_rvalid && !s_rready) |=> (s_rvalid && $stable(s_rdata)));
endmodule
