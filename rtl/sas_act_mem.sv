// sas_act_mem: one activation memory protected by Shift-and-Safe (SaS).
//
// The memory is meant to run at an ultra-low supply at which some bitcells of
// the regular banks are permanently faulty. Every activation carries two C
// bits, fixed at post-fabrication test, that say how its cells are damaged
// (see sas_pkg). On a write, sas_write_port shifts L activations and shifts
// and flips M activations so that the faulty cells hold low-order bits, and
// M&L activations are copied, one per cycle, into the safe (last, fully
// supplied) bank at the Safe Pointer. On a read, sas_read_port undoes the
// transforms and the M&L activations of the block are fetched from the safe
// bank through the same single memory port, in the order they were written.
//
// Interface: role = 1 makes the memory the output (write) buffer of the
// current layer, role = 0 the input (read) buffer; a change of role restarts
// the Safe Pointer. Writes (wr_*) and read requests (rd_*) are valid/ready
// handshakes on 32-byte block addresses, accepted only in the matching role
// and only when the controller is idle; restored blocks leave on out_* with a
// valid/ready handshake. prog_* writes the C bits of one block and is meant
// for test time. Blocks must be read in the same order they were written.
//
// Timing with memory latency L (default 3) and k M&L activations in a block:
// a read request accepted at cycle t gives out_valid at t+L+1 when k = 0, and
// at t+2L+k+1 otherwise (the k safe-bank reads are issued on consecutive
// cycles). A write accepted at t frees the controller at t+L+1+k (the C bits
// of the block are read first).
// The transforms, the 4-to-1 read multiplexers, the FIFO use of the last bank
// and sharing one port follow the paper; the handshakes, the state machine
// and the reading of C bits before a write are this design's own.
module sas_act_mem
  import sas_pkg::*;
#(
  parameter int unsigned BANKS       = 8,
  parameter int unsigned BANK_BLOCKS = 8192,
  parameter int unsigned LATENCY     = 3,
  localparam int unsigned BLOCKS     = BANKS * BANK_BLOCKS,
  localparam int unsigned BAW        = $clog2(BLOCKS),          // block address width
  localparam int unsigned LW         = $clog2(LANES),
  localparam int unsigned AAW        = BAW + LW                 // activation address width
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           role,

  input  logic           wr_valid,
  output logic           wr_ready,
  input  logic [BAW-1:0] wr_addr,
  input  block_t         wr_data,

  input  logic           rd_valid,
  output logic           rd_ready,
  input  logic [BAW-1:0] rd_addr,

  output logic           out_valid,
  input  logic           out_ready,
  output block_t         out_data,

  input  logic           prog_valid,
  output logic           prog_ready,
  input  logic [BAW-1:0] prog_addr,
  input  cblock_t        prog_cbits,

  output logic [AAW-1:0] sp,
  output logic           sp_overflow
);

  typedef enum logic [2:0] {S_IDLE, S_W_CB, S_W_SAFE, S_R_WAIT, S_R_SAFE, S_R_OUT} state_e;
  state_e state;

  // ---------------------------------------------------------------- storage
  logic                   mem_req, mem_we, mem_rvalid;
  logic [BAW-1:0]         mem_addr;
  logic [LANES-1:0]       mem_lane_we;
  block_t                 mem_wdata, mem_rdata;

  scratchpad #(.BANKS(BANKS), .BANK_BLOCKS(BANK_BLOCKS), .LANES(LANES), .ACT_W(ACT_W),
               .LATENCY(LATENCY)) u_mem (
    .clk, .rst_n,
    .req    (mem_req),
    .we     (mem_we),
    .addr   (mem_addr),
    .lane_we(mem_lane_we),
    .wdata  (mem_wdata),
    .rvalid (mem_rvalid),
    .rdata  (mem_rdata)
  );

  logic           cb_en, cb_we, cb_rvalid;
  logic [BAW-1:0] cb_addr;
  cblock_t        cb_rdata;

  cbit_memory #(.BLOCKS(BLOCKS), .WIDTH(LANES*C_W), .LATENCY(LATENCY)) u_cbits (
    .clk, .rst_n,
    .en    (cb_en),
    .we    (cb_we),
    .addr  (cb_addr),
    .wdata (prog_cbits),
    .rvalid(cb_rvalid),
    .rdata (cb_rdata)
  );

  // ---------------------------------------------------------- safe pointer
  logic sp_advance;

  safe_pointer #(.AW(AAW), .SAFE_ENTRIES(BANK_BLOCKS * LANES)) u_sp (
    .clk, .rst_n,
    .role    (role),
    .advance (sp_advance),
    .sp      (sp),
    .overflow(sp_overflow)
  );

  // ------------------------------------------------------------ registers
  logic [BAW-1:0]   addr_q;
  block_t           data_q;        // write data (write) or raw block (read)
  cblock_t          cbits_q;
  logic [LANES-1:0] issue_pend;    // M&L lanes still to access in the safe bank
  logic [LANES-1:0] ret_pend;      // M&L lanes whose safe-bank read has not returned
  logic [AAW-1:0]   rsp;           // safe-bank address of the next returning read

  // ---------------------------------------------------------- write side
  block_t           enc_data;
  logic [LANES-1:0] enc_ml;

  sas_write_port u_wport (
    .act_in   (data_q),
    .cbits    (cb_rdata),
    .act_store(enc_data),
    .ml_mask  (enc_ml)
  );

  // ----------------------------------------------------------- read side
  logic [LANES-1:0] sp_load;
  act_t             sp_data;

  sas_read_port u_rport (
    .clk, .rst_n,
    .raw    (data_q),
    .cbits  (cbits_q),
    .sp_data(sp_data),
    .sp_load(sp_load),
    .act_out(out_data)
  );

  // Lowest set bit of a lane mask, as a one-hot mask and as an index.
  function automatic logic [LANES-1:0] lowest(input logic [LANES-1:0] m);
    return m & (~m + 1'b1);
  endfunction

  function automatic logic [LW-1:0] index_of(input logic [LANES-1:0] onehot);
    logic [LW-1:0] r;
    r = '0;
    for (int l = 0; l < LANES; l++) if (onehot[l]) r = LW'(l);
    return r;
  endfunction

  function automatic logic [LANES-1:0] ml_lanes(input cblock_t c);
    logic [LANES-1:0] r;
    for (int l = 0; l < LANES; l++) r[l] = (ctype_of(c, l) == C_ML);
    return r;
  endfunction

  logic [LANES-1:0] issue_lane, ret_lane;
  assign issue_lane = lowest(issue_pend);
  assign ret_lane   = lowest(ret_pend);
  assign sp_data    = mem_rdata[rsp[LW-1:0]];

  logic accept_prog, accept_wr, accept_rd;
  assign prog_ready  = (state == S_IDLE);
  assign wr_ready    = (state == S_IDLE) && !prog_valid && role;
  assign rd_ready    = (state == S_IDLE) && !prog_valid && !role;
  assign accept_prog = prog_valid && prog_ready;
  assign accept_wr   = wr_valid && wr_ready;
  assign accept_rd   = rd_valid && rd_ready;
  assign out_valid   = (state == S_R_OUT);

  // ------------------------------------------------ port and C-bit control
  always_comb begin
    mem_req     = 1'b0;
    mem_we      = 1'b0;
    mem_addr    = addr_q;
    mem_lane_we = '0;
    mem_wdata   = enc_data;
    cb_en       = 1'b0;
    cb_we       = 1'b0;
    cb_addr     = addr_q;
    sp_advance  = 1'b0;
    sp_load     = '0;

    unique case (state)
      S_IDLE: begin
        if (accept_prog) begin
          cb_en   = 1'b1;
          cb_we   = 1'b1;
          cb_addr = prog_addr;
        end else if (accept_wr) begin
          cb_en   = 1'b1;
          cb_addr = wr_addr;
        end else if (accept_rd) begin
          cb_en    = 1'b1;
          cb_addr  = rd_addr;
          mem_req  = 1'b1;
          mem_addr = rd_addr;
        end
      end
      S_W_CB: begin
        if (cb_rvalid) begin                      // whole block to the regular bank
          mem_req     = 1'b1;
          mem_we      = 1'b1;
          mem_lane_we = '1;
        end
      end
      S_W_SAFE: begin                             // one M&L activation per cycle
        mem_req     = 1'b1;
        mem_we      = 1'b1;
        mem_addr    = sp[AAW-1:LW];
        mem_lane_we = LANES'(1) << sp[LW-1:0];
        mem_wdata   = {LANES{data_q[index_of(issue_lane)]}};
        sp_advance  = 1'b1;
      end
      S_R_SAFE: begin
        if (issue_pend != '0) begin               // one safe-bank read per cycle
          mem_req    = 1'b1;
          mem_addr   = sp[AAW-1:LW];
          sp_advance = 1'b1;
        end
        if (mem_rvalid) sp_load = ret_lane;
      end
      default: ;
    endcase
  end

  // ---------------------------------------------------------- state machine
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      addr_q     <= '0;
      data_q     <= '0;
      cbits_q    <= '0;
      issue_pend <= '0;
      ret_pend   <= '0;
      rsp        <= '0;
    end else begin
      unique case (state)
        S_IDLE: begin
          if (accept_prog) begin
            state <= S_IDLE;
          end else if (accept_wr) begin
            addr_q <= wr_addr;
            data_q <= wr_data;
            state  <= S_W_CB;
          end else if (accept_rd) begin
            addr_q <= rd_addr;
            state  <= S_R_WAIT;
          end
        end
        S_W_CB: begin
          if (cb_rvalid) begin
            issue_pend <= enc_ml;
            state      <= (enc_ml != '0) ? S_W_SAFE : S_IDLE;
          end
        end
        S_W_SAFE: begin
          issue_pend <= issue_pend & ~issue_lane;
          if ((issue_pend & ~issue_lane) == '0) state <= S_IDLE;
        end
        S_R_WAIT: begin
          if (mem_rvalid) begin
            data_q     <= mem_rdata;
            cbits_q    <= cb_rdata;
            issue_pend <= ml_lanes(cb_rdata);
            ret_pend   <= ml_lanes(cb_rdata);
            rsp        <= sp;
            state      <= (ml_lanes(cb_rdata) != '0) ? S_R_SAFE : S_R_OUT;
          end
        end
        S_R_SAFE: begin
          if (issue_pend != '0) issue_pend <= issue_pend & ~issue_lane;
          if (mem_rvalid) begin
            ret_pend <= ret_pend & ~ret_lane;
            rsp      <= rsp - 1'b1;
            if ((ret_pend & ~ret_lane) == '0) state <= S_R_OUT;
          end
        end
        S_R_OUT: begin
          if (out_ready) state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // ---------------------------------------------------------------- checks
  // The C bits and the activation block of a read arrive in the same cycle.
  assert property (@(posedge clk) disable iff (!rst_n)
                   (state == S_R_WAIT && mem_rvalid) |-> cb_rvalid)
    else $error("sas_act_mem: C bits and activation block out of step");
  // A role swap restarts the Safe Pointer, so it must not happen mid-access.
  assert property (@(posedge clk) disable iff (!rst_n)
                   (state != S_IDLE) |=> $stable(role))
    else $error("sas_act_mem: role changed while an access was in progress");
  // The restored block is held until the consumer takes it.
  assert property (@(posedge clk) disable iff (!rst_n)
                   (out_valid && !out_ready) |=> (out_valid && $stable(out_data)))
    else $error("sas_act_mem: output block changed before it was taken");

endmodule
