// sas_accelerator: CNN inference accelerator whose activation memories run at
// an ultra-low supply and are protected by Shift-and-Safe (SaS).
//
// Blocks: two 2 MiB SaS activation memories (sas_act_mem) that swap their
// input and output roles after every layer, a 2 MiB weight memory
// (scratchpad), a dispatcher that feeds a 16 x 16 output-stationary PE array,
// an output buffer that returns results to the activation memories in
// address order, and a control unit that sequences layers.
//
// Use, all through valid/ready handshakes while busy is low:
//  1. cprog_*: write the C bits (fault classes) of every block of both
//     activation memories, as a post-fabrication test would.
//  2. wload_*: write the weight tiles, 16 blocks per layer, layer l at
//     weight blocks 16*l .. 16*l+15 (block k holds row k: W[k][0..15]).
//  3. host_wr_*: write the input activations, one 32-byte block per row,
//     from block 0 upwards, into the memory that is currently the output
//     buffer (memory 0 after reset).
//  4. start with num_layers, num_tiles (16 rows each) and frac_bits (the
//     fixed-point shift applied to each dot product); done pulses at the end.
//  5. host_rd_* / host_out_*: read the result blocks from block 0 upwards
//     from the memory that is now the input buffer (src_sel names it).
// Blocks of an activation memory must be read in the order they were written
// and each only once per role, because M&L activations are kept in a FIFO.
// The memory sizes, the array size, the 16-bit fixed-point data, the role
// swap and the SaS mechanisms follow the paper; the host ports, the layer
// shape and the sequencing are this design's own.
module sas_accelerator
  import sas_pkg::*;
#(
  parameter int unsigned BANKS       = 8,
  parameter int unsigned BANK_BLOCKS = 8192,
  parameter int unsigned LATENCY     = 3,
  parameter int unsigned ROWS        = 16,
  parameter int unsigned COLS        = 16,
  parameter int unsigned ACC_W       = 40,
  localparam int unsigned BAW        = $clog2(BANKS * BANK_BLOCKS),
  localparam int unsigned AAW        = BAW + $clog2(LANES)
) (
  input  logic           clk,
  input  logic           rst_n,
  // C-bit programming
  input  logic           cprog_valid,
  output logic           cprog_ready,
  input  logic           cprog_mem,
  input  logic [BAW-1:0] cprog_addr,
  input  cblock_t        cprog_cbits,
  // weight loading
  input  logic           wload_valid,
  output logic           wload_ready,
  input  logic [BAW-1:0] wload_addr,
  input  block_t         wload_data,
  // host writes into the current output-buffer memory
  input  logic           host_wr_valid,
  output logic           host_wr_ready,
  input  logic [BAW-1:0] host_wr_addr,
  input  block_t         host_wr_data,
  // host reads from the current input-buffer memory
  input  logic           host_rd_valid,
  output logic           host_rd_ready,
  input  logic [BAW-1:0] host_rd_addr,
  output logic           host_out_valid,
  input  logic           host_out_ready,
  output block_t         host_out_data,
  // run control and status
  input  logic           start,
  input  logic [7:0]     num_layers,
  input  logic [BAW-5:0] num_tiles,
  input  logic [4:0]     frac_bits,
  output logic           busy,
  output logic           done,
  output logic           src_sel,
  output logic [AAW-1:0] sp [2],
  output logic [1:0]     sp_overflow
);

  // ------------------------------------------------------------ control unit
  logic           w_req, w_rvalid;
  logic [BAW-1:0] w_addr;
  logic           cu_rd_valid, cu_rd_ready, cu_rd_out_valid, cu_rd_out_ready;
  logic [BAW-1:0] cu_rd_addr;
  logic           cu_wr_valid, cu_wr_ready;
  logic [BAW-1:0] cu_wr_addr;
  logic           a_we, w_we, pe_start, pe_done, ob_capture, ob_valid, ob_ready, ob_busy;
  logic [3:0]     a_row, w_row;

  control_unit #(.BAW(BAW), .WAW(BAW)) u_cu (
    .clk, .rst_n,
    .start, .num_layers, .num_tiles,
    .busy, .done, .src_sel,
    .w_req, .w_addr, .w_rvalid,
    .rd_valid(cu_rd_valid), .rd_ready(cu_rd_ready), .rd_addr(cu_rd_addr),
    .rd_out_valid(cu_rd_out_valid), .rd_out_ready(cu_rd_out_ready),
    .wr_valid(cu_wr_valid), .wr_ready(cu_wr_ready), .wr_addr(cu_wr_addr),
    .a_we, .a_row, .w_we, .w_row, .pe_start, .pe_done,
    .ob_capture, .ob_valid, .ob_ready, .ob_busy
  );

  // ----------------------------------------------------------- weight memory
  block_t w_rdata;

  scratchpad #(.BANKS(BANKS), .BANK_BLOCKS(BANK_BLOCKS), .LANES(LANES), .ACT_W(ACT_W),
               .LATENCY(LATENCY)) u_wmem (
    .clk, .rst_n,
    .req    (busy ? w_req : wload_valid),
    .we     (!busy),
    .addr   (busy ? w_addr : wload_addr),
    .lane_we('1),
    .wdata  (wload_data),
    .rvalid (w_rvalid),
    .rdata  (w_rdata)
  );
  assign wload_ready = !busy;

  // ---------------------------------------------------- activation memories
  block_t ob_data;
  block_t am_out [2];
  logic [1:0] am_wr_ready, am_rd_ready, am_out_valid, am_prog_ready;

  for (genvar m = 0; m < 2; m++) begin : g_am
    logic is_src;
    assign is_src = (src_sel == 1'(m));

    sas_act_mem #(.BANKS(BANKS), .BANK_BLOCKS(BANK_BLOCKS), .LATENCY(LATENCY)) u_am (
      .clk, .rst_n,
      .role       (!is_src),
      .wr_valid   (!is_src && (busy ? cu_wr_valid : host_wr_valid)),
      .wr_ready   (am_wr_ready[m]),
      .wr_addr    (busy ? cu_wr_addr : host_wr_addr),
      .wr_data    (busy ? ob_data : host_wr_data),
      .rd_valid   (is_src && (busy ? cu_rd_valid : host_rd_valid)),
      .rd_ready   (am_rd_ready[m]),
      .rd_addr    (busy ? cu_rd_addr : host_rd_addr),
      .out_valid  (am_out_valid[m]),
      .out_ready  (is_src && (busy ? cu_rd_out_ready : host_out_ready)),
      .out_data   (am_out[m]),
      .prog_valid (!busy && cprog_valid && (cprog_mem == 1'(m))),
      .prog_ready (am_prog_ready[m]),
      .prog_addr  (cprog_addr),
      .prog_cbits (cprog_cbits),
      .sp         (sp[m]),
      .sp_overflow(sp_overflow[m])
    );
  end

  logic src_out_valid, dst_wr_ready, src_rd_ready;
  assign src_out_valid = am_out_valid[src_sel];
  assign src_rd_ready  = am_rd_ready[src_sel];
  assign dst_wr_ready  = am_wr_ready[!src_sel];

  assign cu_rd_ready     = busy && src_rd_ready;
  assign cu_rd_out_valid = busy && src_out_valid;
  assign cu_wr_ready     = busy && dst_wr_ready;
  assign host_rd_ready   = !busy && src_rd_ready;
  assign host_out_valid  = !busy && src_out_valid;
  assign host_out_data   = am_out[src_sel];
  assign host_wr_ready   = !busy && dst_wr_ready;
  assign cprog_ready     = !busy && am_prog_ready[cprog_mem];

  // ------------------------------------------------- dispatcher and PE array
  logic                    pe_clear, disp_busy;
  logic [$clog2(ROWS)-1:0] ob_row;
  logic signed [ACT_W-1:0] a_left [ROWS];
  logic signed [ACT_W-1:0] w_top  [COLS];
  logic signed [ACC_W-1:0] acc    [ROWS][COLS];

  dispatcher #(.ROWS(ROWS), .COLS(COLS)) u_disp (
    .clk, .rst_n,
    .a_we, .a_row(a_row[$clog2(ROWS)-1:0]), .a_data(am_out[src_sel]),
    .w_we, .w_row, .w_data(w_rdata),
    .start (pe_start),
    .busy  (disp_busy),
    .done  (pe_done),
    .clear (pe_clear),
    .a_left, .w_top
  );

  pe_array #(.ROWS(ROWS), .COLS(COLS), .ACT_W(ACT_W), .ACC_W(ACC_W)) u_array (
    .clk, .rst_n,
    .clear(pe_clear),
    .a_left, .w_top, .acc
  );

  output_buffer #(.ROWS(ROWS), .COLS(COLS), .ACC_W(ACC_W)) u_obuf (
    .clk, .rst_n,
    .capture  (ob_capture),
    .frac_bits(frac_bits),
    .acc,
    .busy     (ob_busy),
    .out_valid(ob_valid),
    .out_ready(ob_ready),
    .out_row  (ob_row),
    .out_data (ob_data)
  );

  // The array is only started when the previous feed has finished, and each
  // result row goes to the block of the same index within its tile.
  assert property (@(posedge clk) disable iff (!rst_n) pe_start |-> !disp_busy)
    else $error("sas_accelerator: PE array restarted while feeding");
  assert property (@(posedge clk) disable iff (!rst_n)
                   (ob_valid && ob_ready) |-> (cu_wr_addr[3:0] == 4'(ob_row)))
    else $error("sas_accelerator: result row written to the wrong block");

  initial assert (ROWS == 16 && COLS == LANES)
    else $fatal(1, "sas_accelerator: the control unit's tiling needs a 16 x 16 array");

endmodule
