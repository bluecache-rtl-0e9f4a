// bluecache_cluster: a BlueCache cluster of NUM_NODES nodes chained in a
// linear array by their inter-controller links (request and response
// networks).  Node i is linked to node i-1 on its west side and node i+1 on
// its east side; the links at both ends are left unconnected.  Every node
// keeps its own client PCIe interface, DRAM port and flash-controller port,
// which are brought out as per-node arrays.  Any client can reach any key:
// the node it talks to forwards the request to the owner node.
//
// Follows the original: nodes chained in a linear array, each with its own
// host, DRAM and flash. Own choice: the links between neighbours are plain
// parallel signals.
module bluecache_cluster
  import bc_pkg::*;
#(
  parameter int NUM_NODES   = 4,
  parameter int INDEX_BITS  = 24,
  parameter int NUM_CLASSES = 15,
  parameter int REGION_BITS = 22,
  parameter int LOG_BLOCKS  = 4032,
  parameter int FLUSH_IDLE  = 256
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              seg_valid      [NUM_NODES],
  output logic              seg_ready      [NUM_NODES],
  input  logic [6:0]        seg_idx        [NUM_NODES],
  input  logic [10:0]       seg_words      [NUM_NODES],
  output logic              seg_ack_valid  [NUM_NODES],
  output logic [6:0]        seg_ack_idx    [NUM_NODES],
  output logic              hr_valid       [NUM_NODES],
  input  logic              hr_ready       [NUM_NODES],
  output logic [63:0]       hr_addr        [NUM_NODES],
  output logic [7:0]        hr_words       [NUM_NODES],
  input  logic              hd_valid       [NUM_NODES],
  input  logic [63:0]       hd_data        [NUM_NODES],
  output logic              hw_valid       [NUM_NODES],
  input  logic              hw_ready       [NUM_NODES],
  output logic [63:0]       hw_addr        [NUM_NODES],
  output logic [63:0]       hw_data        [NUM_NODES],
  output logic              irq_valid      [NUM_NODES],
  output logic [6:0]        irq_idx        [NUM_NODES],
  output logic [10:0]       irq_words      [NUM_NODES],
  input  logic              seg_free_valid [NUM_NODES],
  input  logic [6:0]        seg_free_idx   [NUM_NODES],
  output logic              dram_req_valid [NUM_NODES],
  input  logic              dram_req_ready [NUM_NODES],
  output dram_req_t         dram_req       [NUM_NODES],
  input  logic              dram_resp_valid[NUM_NODES],
  input  line_t             dram_resp_data [NUM_NODES],
  output logic              fcmd_valid     [NUM_NODES],
  input  logic              fcmd_ready     [NUM_NODES],
  output flash_cmd_t        fcmd           [NUM_NODES],
  output logic              fwdata_valid   [NUM_NODES],
  input  logic              fwdata_ready   [NUM_NODES],
  output line_t             fwdata         [NUM_NODES],
  input  logic              frdata_valid   [NUM_NODES],
  input  flash_rdata_t      frdata         [NUM_NODES],
  input  logic              fack_valid     [NUM_NODES],
  input  flash_erase_ack_t  fack           [NUM_NODES],
  input  logic              flush_req      [NUM_NODES],
  output logic [31:0]       ev             [NUM_NODES][16]
);
  // link wires: index [node][side]
  logic [1:0]       qtx_rsv_valid [NUM_NODES], qtx_rsv_ack [NUM_NODES], qtx_d_valid [NUM_NODES];
  logic [1:0]       qrx_rsv_valid [NUM_NODES], qrx_rsv_ack [NUM_NODES], qrx_d_valid [NUM_NODES];
  logic [LEN_W-1:0] qtx_rsv_words [NUM_NODES][2], qrx_rsv_words [NUM_NODES][2];
  net_flit_t        qtx_d [NUM_NODES][2], qrx_d [NUM_NODES][2];
  logic [1:0]       stx_rsv_valid [NUM_NODES], stx_rsv_ack [NUM_NODES], stx_d_valid [NUM_NODES];
  logic [1:0]       srx_rsv_valid [NUM_NODES], srx_rsv_ack [NUM_NODES], srx_d_valid [NUM_NODES];
  logic [LEN_W-1:0] stx_rsv_words [NUM_NODES][2], srx_rsv_words [NUM_NODES][2];
  net_flit_t        stx_d [NUM_NODES][2], srx_d [NUM_NODES][2];

  for (genvar n = 0; n < NUM_NODES; n++) begin : g_node
    // west side of node n <-> east side of node n-1
    if (n > 0) begin : g_w
      assign qrx_rsv_valid[n][0] = qtx_rsv_valid[n-1][1];
      assign qrx_rsv_words[n][0] = qtx_rsv_words[n-1][1];
      assign qtx_rsv_ack[n][0]   = qrx_rsv_ack[n-1][1];
      assign qrx_d_valid[n][0]   = qtx_d_valid[n-1][1];
      assign qrx_d[n][0]         = qtx_d[n-1][1];
      assign srx_rsv_valid[n][0] = stx_rsv_valid[n-1][1];
      assign srx_rsv_words[n][0] = stx_rsv_words[n-1][1];
      assign stx_rsv_ack[n][0]   = srx_rsv_ack[n-1][1];
      assign srx_d_valid[n][0]   = stx_d_valid[n-1][1];
      assign srx_d[n][0]         = stx_d[n-1][1];
    end else begin : g_w0
      assign qrx_rsv_valid[n][0] = 1'b0; assign qrx_rsv_words[n][0] = '0; assign qtx_rsv_ack[n][0] = 1'b0;
      assign qrx_d_valid[n][0]   = 1'b0; assign qrx_d[n][0] = '0;
      assign srx_rsv_valid[n][0] = 1'b0; assign srx_rsv_words[n][0] = '0; assign stx_rsv_ack[n][0] = 1'b0;
      assign srx_d_valid[n][0]   = 1'b0; assign srx_d[n][0] = '0;
    end
    if (n < NUM_NODES-1) begin : g_e
      assign qrx_rsv_valid[n][1] = qtx_rsv_valid[n+1][0];
      assign qrx_rsv_words[n][1] = qtx_rsv_words[n+1][0];
      assign qtx_rsv_ack[n][1]   = qrx_rsv_ack[n+1][0];
      assign qrx_d_valid[n][1]   = qtx_d_valid[n+1][0];
      assign qrx_d[n][1]         = qtx_d[n+1][0];
      assign srx_rsv_valid[n][1] = stx_rsv_valid[n+1][0];
      assign srx_rsv_words[n][1] = stx_rsv_words[n+1][0];
      assign stx_rsv_ack[n][1]   = srx_rsv_ack[n+1][0];
      assign srx_d_valid[n][1]   = stx_d_valid[n+1][0];
      assign srx_d[n][1]         = stx_d[n+1][0];
    end else begin : g_eN
      assign qrx_rsv_valid[n][1] = 1'b0; assign qrx_rsv_words[n][1] = '0; assign qtx_rsv_ack[n][1] = 1'b0;
      assign qrx_d_valid[n][1]   = 1'b0; assign qrx_d[n][1] = '0;
      assign srx_rsv_valid[n][1] = 1'b0; assign srx_rsv_words[n][1] = '0; assign stx_rsv_ack[n][1] = 1'b0;
      assign srx_d_valid[n][1]   = 1'b0; assign srx_d[n][1] = '0;
    end

    bluecache_node #(.NUM_NODES(NUM_NODES), .INDEX_BITS(INDEX_BITS), .NUM_CLASSES(NUM_CLASSES),
                     .REGION_BITS(REGION_BITS), .LOG_BLOCKS(LOG_BLOCKS), .FLUSH_IDLE(FLUSH_IDLE)) u_node (
      .clk, .rst_n, .node_id(NODE_W'(n)),
      .seg_valid(seg_valid[n]), .seg_ready(seg_ready[n]), .seg_idx(seg_idx[n]), .seg_words(seg_words[n]),
      .seg_ack_valid(seg_ack_valid[n]), .seg_ack_idx(seg_ack_idx[n]),
      .hr_valid(hr_valid[n]), .hr_ready(hr_ready[n]), .hr_addr(hr_addr[n]), .hr_words(hr_words[n]),
      .hd_valid(hd_valid[n]), .hd_data(hd_data[n]),
      .hw_valid(hw_valid[n]), .hw_ready(hw_ready[n]), .hw_addr(hw_addr[n]), .hw_data(hw_data[n]),
      .irq_valid(irq_valid[n]), .irq_idx(irq_idx[n]), .irq_words(irq_words[n]),
      .seg_free_valid(seg_free_valid[n]), .seg_free_idx(seg_free_idx[n]),
      .dram_req_valid(dram_req_valid[n]), .dram_req_ready(dram_req_ready[n]), .dram_req(dram_req[n]),
      .dram_resp_valid(dram_resp_valid[n]), .dram_resp_data(dram_resp_data[n]),
      .fcmd_valid(fcmd_valid[n]), .fcmd_ready(fcmd_ready[n]), .fcmd(fcmd[n]),
      .fwdata_valid(fwdata_valid[n]), .fwdata_ready(fwdata_ready[n]), .fwdata(fwdata[n]),
      .frdata_valid(frdata_valid[n]), .frdata(frdata[n]), .fack_valid(fack_valid[n]), .fack(fack[n]),
      .flush_req(flush_req[n]),
      .qtx_rsv_valid(qtx_rsv_valid[n]), .qtx_rsv_words(qtx_rsv_words[n]), .qtx_rsv_ack(qtx_rsv_ack[n]),
      .qtx_d_valid(qtx_d_valid[n]), .qtx_d(qtx_d[n]),
      .qrx_rsv_valid(qrx_rsv_valid[n]), .qrx_rsv_words(qrx_rsv_words[n]), .qrx_rsv_ack(qrx_rsv_ack[n]),
      .qrx_d_valid(qrx_d_valid[n]), .qrx_d(qrx_d[n]),
      .stx_rsv_valid(stx_rsv_valid[n]), .stx_rsv_words(stx_rsv_words[n]), .stx_rsv_ack(stx_rsv_ack[n]),
      .stx_d_valid(stx_d_valid[n]), .stx_d(stx_d[n]),
      .srx_rsv_valid(srx_rsv_valid[n]), .srx_rsv_words(srx_rsv_words[n]), .srx_rsv_ack(srx_rsv_ack[n]),
      .srx_d_valid(srx_d_valid[n]), .srx_d(srx_d[n]),
      .ev(ev[n]));
  end
endmodule
