// bluecache_node: one BlueCache node - the hardware key-value daemon that
// sits between a client's PCIe link, the node's DRAM and flash, and the
// inter-controller network.
//
// Request path: DMA read engine -> request splitter (nodeId = hash(key) mod
// NUM_NODES) -> either straight to the request merger or via the remote
// queue into the request router -> merger (local and remote requests take
// turns) -> local request queue -> KVS protocol engine -> hybrid-memory hash
// table.  Response path: protocol engine -> response splitter (on the
// request's sender node) -> response merger or remote queue -> response
// router; responses arriving from other nodes join at the response merger ->
// DMA write engine -> client.  Requests and responses use two separate
// router instances (two virtual networks) so that responses never wait
// behind requests.
// DRAM, flash controller, PCIe and the serial links are external: their
// interfaces are this module's ports.
//
// Follows the original: the block structure of a node (client network engine,
// inter-node network engine, protocol engine, hybrid hash table) and the
// separate request and response networks. Own choices: the event counters and
// the port bundling.
module bluecache_node
  import bc_pkg::*;
#(
  parameter int NUM_NODES   = 4,
  parameter int INDEX_BITS  = 24,
  parameter int NUM_CLASSES = 15,
  parameter int REGION_BITS = 22,
  parameter int LOG_BLOCKS  = 4032,
  parameter int ROB_TAGS    = 64,
  parameter int FLUSH_IDLE  = 256
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [NODE_W-1:0] node_id,
  // client: request segments
  input  logic              seg_valid,
  output logic              seg_ready,
  input  logic [6:0]        seg_idx,
  input  logic [10:0]       seg_words,
  output logic              seg_ack_valid,
  output logic [6:0]        seg_ack_idx,
  output logic              hr_valid,
  input  logic              hr_ready,
  output logic [63:0]       hr_addr,
  output logic [7:0]        hr_words,
  input  logic              hd_valid,
  input  logic [63:0]       hd_data,
  // client: response segments
  output logic              hw_valid,
  input  logic              hw_ready,
  output logic [63:0]       hw_addr,
  output logic [63:0]       hw_data,
  output logic              irq_valid,
  output logic [6:0]        irq_idx,
  output logic [10:0]       irq_words,
  input  logic              seg_free_valid,
  input  logic [6:0]        seg_free_idx,
  // DRAM
  output logic              dram_req_valid,
  input  logic              dram_req_ready,
  output dram_req_t         dram_req,
  input  logic              dram_resp_valid,
  input  line_t             dram_resp_data,
  // flash controller
  output logic              fcmd_valid,
  input  logic              fcmd_ready,
  output flash_cmd_t        fcmd,
  output logic              fwdata_valid,
  input  logic              fwdata_ready,
  output line_t             fwdata,
  input  logic              frdata_valid,
  input  flash_rdata_t      frdata,
  input  logic              fack_valid,
  input  flash_erase_ack_t  fack,
  input  logic              flush_req,
  // request network links (0 west, 1 east)
  output logic [1:0]        qtx_rsv_valid,
  output logic [LEN_W-1:0]  qtx_rsv_words [2],
  input  logic [1:0]        qtx_rsv_ack,
  output logic [1:0]        qtx_d_valid,
  output net_flit_t         qtx_d [2],
  input  logic [1:0]        qrx_rsv_valid,
  input  logic [LEN_W-1:0]  qrx_rsv_words [2],
  output logic [1:0]        qrx_rsv_ack,
  input  logic [1:0]        qrx_d_valid,
  input  net_flit_t         qrx_d [2],
  // response network links
  output logic [1:0]        stx_rsv_valid,
  output logic [LEN_W-1:0]  stx_rsv_words [2],
  input  logic [1:0]        stx_rsv_ack,
  output logic [1:0]        stx_d_valid,
  output net_flit_t         stx_d [2],
  input  logic [1:0]        srx_rsv_valid,
  input  logic [LEN_W-1:0]  srx_rsv_words [2],
  output logic [1:0]        srx_rsv_ack,
  input  logic [1:0]        srx_d_valid,
  input  net_flit_t         srx_d [2],
  // event counters
  output logic [31:0]       ev [16]
);
  // ---------------- client request side
  logic      d2s_valid, d2s_ready;
  net_flit_t d2s;
  dma_read_engine u_dmar (
    .clk, .rst_n, .seg_valid, .seg_ready, .seg_idx, .seg_words,
    .ack_valid(seg_ack_valid), .ack_idx(seg_ack_idx),
    .hr_valid, .hr_ready, .hr_addr, .hr_words, .hd_valid, .hd_data,
    .out_valid(d2s_valid), .out_ready(d2s_ready), .out(d2s));

  logic      qs_loc_valid, qs_loc_ready, qs_rem_valid, qs_rem_ready;
  net_flit_t qs_loc, qs_rem;
  net_splitter #(.IS_REQ(1'b1), .NUM_NODES(NUM_NODES)) u_qsplit (
    .clk, .rst_n, .node_id, .in_valid(d2s_valid), .in_ready(d2s_ready), .in(d2s),
    .loc_valid(qs_loc_valid), .loc_ready(qs_loc_ready), .loc(qs_loc),
    .rem_valid(qs_rem_valid), .rem_ready(qs_rem_ready), .rem(qs_rem),
    .n_local(ev[0]), .n_remote(ev[1]));

  // remote request queue
  logic      qremq_valid, qremq_ready;
  net_flit_t qremq;
  logic [6:0] qremq_count;
  sync_fifo #(.T(net_flit_t), .DEPTH(64)) u_qremq (
    .clk, .rst_n, .in_valid(qs_rem_valid), .in_ready(qs_rem_ready), .in_data(qs_rem),
    .out_valid(qremq_valid), .out_ready(qremq_ready), .out_data(qremq), .count(qremq_count));

  logic      qej_valid, qej_ready;
  net_flit_t qej;
  network_router u_qrouter (
    .clk, .rst_n, .node_id, .inj_valid(qremq_valid), .inj_ready(qremq_ready), .inj(qremq),
    .ej_valid(qej_valid), .ej_ready(qej_ready), .ej(qej),
    .tx_rsv_valid(qtx_rsv_valid), .tx_rsv_words(qtx_rsv_words), .tx_rsv_ack(qtx_rsv_ack),
    .tx_d_valid(qtx_d_valid), .tx_d(qtx_d),
    .rx_rsv_valid(qrx_rsv_valid), .rx_rsv_words(qrx_rsv_words), .rx_rsv_ack(qrx_rsv_ack),
    .rx_d_valid(qrx_d_valid), .rx_d(qrx_d), .n_reservations(ev[2]));

  logic      qm_valid, qm_ready;
  net_flit_t qm;
  net_merger u_qmerge (
    .clk, .rst_n, .loc_valid(qs_loc_valid), .loc_ready(qs_loc_ready), .loc(qs_loc),
    .rem_valid(qej_valid), .rem_ready(qej_ready), .rem(qej),
    .out_valid(qm_valid), .out_ready(qm_ready), .out(qm), .n_local(ev[3]), .n_remote(ev[4]));

  // local request queue
  logic      locq_valid, locq_ready;
  net_flit_t locq;
  logic [6:0] locq_count;
  sync_fifo #(.T(net_flit_t), .DEPTH(64)) u_locq (
    .clk, .rst_n, .in_valid(qm_valid), .in_ready(qm_ready), .in_data(qm),
    .out_valid(locq_valid), .out_ready(locq_ready), .out_data(locq), .count(locq_count));

  // ---------------- protocol engine + hash table
  logic      pe_rsp_valid, pe_rsp_ready;
  net_flit_t pe_rsp;
  logic      ht_cmd_valid, ht_cmd_ready, ht_in_valid, ht_in_ready, ht_resp_valid, ht_resp_ready;
  logic      ht_out_valid, ht_out_ready, ht_out_last;
  ht_cmd_t   ht_cmd;
  ht_resp_t  ht_resp;
  logic [63:0] ht_in_word, ht_out_word;

  kvs_protocol_engine u_proto (
    .clk, .rst_n, .node_id, .req_valid(locq_valid), .req_ready(locq_ready), .req(locq),
    .rsp_valid(pe_rsp_valid), .rsp_ready(pe_rsp_ready), .rsp(pe_rsp),
    .ht_cmd_valid, .ht_cmd_ready, .ht_cmd, .ht_in_valid, .ht_in_ready, .ht_in_word,
    .ht_resp_valid, .ht_resp_ready, .ht_resp, .ht_out_valid, .ht_out_ready, .ht_out_word, .ht_out_last,
    .n_false_hits(ev[5]));

  hybrid_hash_table #(.INDEX_BITS(INDEX_BITS), .NUM_CLASSES(NUM_CLASSES), .REGION_BITS(REGION_BITS),
                      .LOG_BLOCKS(LOG_BLOCKS), .ROB_TAGS(ROB_TAGS)) u_ht (
    .clk, .rst_n, .cmd_valid(ht_cmd_valid), .cmd_ready(ht_cmd_ready), .cmd(ht_cmd),
    .in_valid(ht_in_valid), .in_ready(ht_in_ready), .in_word(ht_in_word),
    .resp_valid(ht_resp_valid), .resp_ready(ht_resp_ready), .resp(ht_resp),
    .out_valid(ht_out_valid), .out_ready(ht_out_ready), .out_word(ht_out_word), .out_last(ht_out_last),
    .flush_req, .dram_req_valid, .dram_req_ready, .dram_req, .dram_resp_valid, .dram_resp_data,
    .fcmd_valid, .fcmd_ready, .fcmd, .fwdata_valid, .fwdata_ready, .fwdata, .frdata_valid, .frdata,
    .fack_valid, .fack,
    .n_evictions(ev[6]), .n_flash_reads(ev[7]), .n_wb_reads(ev[8]), .n_chunks_flushed(ev[9]),
    .n_blocks_erased(ev[10]));

  // ---------------- response side
  logic      ss_loc_valid, ss_loc_ready, ss_rem_valid, ss_rem_ready;
  net_flit_t ss_loc, ss_rem;
  net_splitter #(.IS_REQ(1'b0), .NUM_NODES(NUM_NODES)) u_ssplit (
    .clk, .rst_n, .node_id, .in_valid(pe_rsp_valid), .in_ready(pe_rsp_ready), .in(pe_rsp),
    .loc_valid(ss_loc_valid), .loc_ready(ss_loc_ready), .loc(ss_loc),
    .rem_valid(ss_rem_valid), .rem_ready(ss_rem_ready), .rem(ss_rem),
    .n_local(ev[11]), .n_remote(ev[12]));

  logic      sremq_valid, sremq_ready;
  net_flit_t sremq;
  logic [6:0] sremq_count;
  sync_fifo #(.T(net_flit_t), .DEPTH(64)) u_sremq (
    .clk, .rst_n, .in_valid(ss_rem_valid), .in_ready(ss_rem_ready), .in_data(ss_rem),
    .out_valid(sremq_valid), .out_ready(sremq_ready), .out_data(sremq), .count(sremq_count));

  logic      sej_valid, sej_ready;
  net_flit_t sej;
  network_router u_srouter (
    .clk, .rst_n, .node_id, .inj_valid(sremq_valid), .inj_ready(sremq_ready), .inj(sremq),
    .ej_valid(sej_valid), .ej_ready(sej_ready), .ej(sej),
    .tx_rsv_valid(stx_rsv_valid), .tx_rsv_words(stx_rsv_words), .tx_rsv_ack(stx_rsv_ack),
    .tx_d_valid(stx_d_valid), .tx_d(stx_d),
    .rx_rsv_valid(srx_rsv_valid), .rx_rsv_words(srx_rsv_words), .rx_rsv_ack(srx_rsv_ack),
    .rx_d_valid(srx_d_valid), .rx_d(srx_d), .n_reservations(ev[13]));

  logic      sm_valid, sm_ready;
  net_flit_t sm;
  logic [31:0] sm_nl, sm_nr;
  net_merger u_smerge (
    .clk, .rst_n, .loc_valid(ss_loc_valid), .loc_ready(ss_loc_ready), .loc(ss_loc),
    .rem_valid(sej_valid), .rem_ready(sej_ready), .rem(sej),
    .out_valid(sm_valid), .out_ready(sm_ready), .out(sm), .n_local(sm_nl), .n_remote(ev[14]));

  dma_write_engine #(.FLUSH_IDLE(FLUSH_IDLE)) u_dmaw (
    .clk, .rst_n, .in_valid(sm_valid), .in_ready(sm_ready), .in(sm),
    .hw_valid, .hw_ready, .hw_addr, .hw_data, .irq_valid, .irq_idx, .irq_words,
    .seg_free_valid, .seg_free_idx, .n_early_flush(ev[15]));
endmodule
