// smartag_tag_array: SMARTag-protected tag array of a 4-way set-associative
// data cache (default: 32 KB, 64-byte lines, 128 sets, 32-bit addresses, 19-bit
// tags).
//
// Tags of one set usually share their upper bits because programs touch
// nearby addresses. Wherever two valid tags of a set have equal upper 7 bits,
// one keeps them and the other gives its upper part over to a SEC-DED(38,31)
// code covering the first tag and its own lower 12 bits; its 2-bit UPL names
// the way to borrow the upper part from. Every entry also carries a parity
// bit. So the array needs no extra storage for the codes, and lookups never
// wait for a decoder: the ECC is only used when parity fails.
//
// Operations (req_valid/req_ready handshake, one request at a time):
//   OP_LOOKUP      read the set, rebuild the tags through the UPLs, check
//                  parity, compare. Response one cycle after acceptance.
//   OP_FILL        miss replacement of way req_way by the tag of req_addr:
//                  read, then rebuild the set with new UPLs and codes and write
//                  it back. Response two cycles after acceptance; the second
//                  cycle is the one extra replacement cycle of the scheme.
//   OP_SET_DIRTY   mark a way dirty (write hit). One cycle.
//   OP_INVALIDATE  drop a way and rebuild the set as for a fill. Two cycles.
// If the parity of any valid way of the addressed set fails, the request
// first runs the correction step (smartag_correct) and rereads the row, two
// cycles per erroneous way, until the row is clean; resp_status reports the
// worst outcome. An uncorrectable error ends the request at once with
// ST_UNCORRECTABLE and no hit. After reset the array clears one set per
// cycle (req_ready low for SETS cycles).
//
// The lookup path, the pairing, the codes and the correction rules follow the
// document; the request interface, the correction loop, reset clearing,
// the response fields and the inj_* fault-injection test hook are this
// design's own. The outputs are combinational from the state and the row.
module smartag_tag_array
  import smartag_pkg::*;
#(
  parameter int unsigned ADDR_W     = 32,
  parameter int unsigned SETS       = 128,
  parameter int unsigned LINE_BYTES = 64,
  localparam int unsigned IDX_W     = $clog2(SETS),
  localparam int unsigned OFF_W     = $clog2(LINE_BYTES)
) (
  input  logic              clk,
  input  logic              rst_n,

  input  logic              req_valid,
  output logic              req_ready,
  input  op_e               req_op,
  input  logic [ADDR_W-1:0] req_addr,
  input  way_t              req_way,
  input  logic              req_dirty,

  output logic              resp_valid,
  output logic              resp_hit,
  output way_t              resp_way,
  output logic              resp_dirty,
  output status_e           resp_status,
  output set_state_e        resp_state,
  output event_e            resp_event,
  output logic              resp_upl_update,
  output logic              resp_evict_valid,
  output logic              resp_evict_dirty,
  output tag_t              resp_evict_tag,

  input  logic              inj_valid,
  input  logic [IDX_W-1:0]  inj_set,
  input  logic [ROW_W-1:0]  inj_mask
);

  if (ADDR_W - IDX_W - OFF_W != TAG_W) begin : g_geometry_check
    $error("smartag_tag_array: ADDR_W - log2(SETS) - log2(LINE_BYTES) must equal the 19-bit tag");
  end

  typedef enum logic [2:0] {
    C_INIT, C_IDLE, C_CHECK, C_REREAD, C_UPDATE
  } ctrl_e;

  ctrl_e            state_q;
  logic [IDX_W-1:0] init_q;
  op_e              op_q;
  logic [IDX_W-1:0] idx_q;
  tag_t             tag_q;
  way_t             way_q;
  logic             dirty_q;
  status_e          status_q;
  row_t             row_q;

  // Memory
  logic             rd_en, wr_en;
  logic [IDX_W-1:0] rd_addr, wr_addr;
  row_t             rd_row, wr_row;

  smartag_tag_mem #(.SETS(SETS), .ROW_W(ROW_W)) u_mem (
    .clk      (clk),
    .rd_en    (rd_en),
    .rd_addr  (rd_addr),
    .rd_data  (rd_row),
    .wr_en    (wr_en),
    .wr_addr  (wr_addr),
    .wr_data  (wr_row),
    .inj_en   (inj_valid),
    .inj_addr (inj_set),
    .inj_mask (inj_mask)
  );

  // Lookup path: UPL multiplexing and parity check on the row just read.
  tag_vec_t   tag;
  logic [3:0] parity_err, tag_err, ecc_prot;
  upper_vec_t upper;
  logic [3:0] valid;
  set_state_e cur_state;
  logic [3:0] hit_vec;

  smartag_tag_rebuild u_rebuild (
    .row        (rd_row),
    .tag        (tag),
    .parity_err (parity_err),
    .tag_err    (tag_err),
    .ecc_prot   (ecc_prot)
  );

  always_comb begin
    for (int w = 0; w < WAYS; w++) begin
      upper[w]   = upper_of(tag[w]);
      valid[w]   = rd_row[w].valid;
      hit_vec[w] = rd_row[w].valid & (tag[w] == tag_q);
    end
  end

  smartag_classify u_classify (
    .upper (upper),
    .valid (valid),
    .state (cur_state),
    .upl   ()
  );

  // Correction path, used only when parity fails.
  row_t    corr_row;
  status_e corr_status;
  way_t    corr_way;
  logic    corr_any;

  smartag_correct u_correct (
    .row        (rd_row),
    .parity_err (parity_err),
    .new_row    (corr_row),
    .status     (corr_status),
    .err_way    (corr_way),
    .any_err    (corr_any)
  );

  // Miss path: set rebuild from the registered row.
  row_t       upd_row;
  set_state_e upd_old_state, upd_new_state;
  event_e     upd_ev;
  logic       upd_upl_update, upd_evict_valid, upd_evict_dirty;
  tag_t       upd_evict_tag;

  smartag_set_update u_update (
    .old_row     (row_q),
    .victim      (way_q),
    .new_tag     (tag_q),
    .new_valid   (op_q == OP_FILL),
    .new_dirty   (dirty_q),
    .new_row     (upd_row),
    .old_state   (upd_old_state),
    .new_state   (upd_new_state),
    .ev          (upd_ev),
    .upl_update  (upd_upl_update),
    .evict_valid (upd_evict_valid),
    .evict_dirty (upd_evict_dirty),
    .evict_tag   (upd_evict_tag)
  );

  function automatic row_t empty_row();
    row_t r;
    r = '0;
    for (int w = 0; w < WAYS; w++) r[w].upl = way_t'(w);
    return r;
  endfunction

  function automatic status_e worse(status_e a, status_e b);
    return (a > b) ? a : b;
  endfunction

  assign req_ready = (state_q == C_IDLE);

  // Memory control and responses.
  always_comb begin
    rd_en   = 1'b0;
    rd_addr = idx_q;
    wr_en   = 1'b0;
    wr_addr = idx_q;
    wr_row  = rd_row;

    resp_valid       = 1'b0;
    resp_hit         = 1'b0;
    resp_way         = '0;
    resp_dirty       = 1'b0;
    resp_status      = status_q;
    resp_state       = cur_state;
    resp_event       = EV_A;
    resp_upl_update  = 1'b0;
    resp_evict_valid = 1'b0;
    resp_evict_dirty = 1'b0;
    resp_evict_tag   = '0;

    unique case (state_q)
      C_INIT: begin
        wr_en   = 1'b1;
        wr_addr = init_q;
        wr_row  = empty_row();
      end
      C_IDLE: begin
        rd_en   = req_valid;
        rd_addr = req_addr[OFF_W +: IDX_W];
      end
      C_REREAD: begin
        rd_en = 1'b1;
      end
      C_CHECK: begin
        if (corr_any) begin
          if (corr_status == ST_UNCORRECTABLE) begin
            resp_valid  = 1'b1;
            resp_status = ST_UNCORRECTABLE;
          end else begin
            wr_en  = 1'b1;
            wr_row = corr_row;
          end
        end else begin
          unique case (op_q)
            OP_LOOKUP: begin
              resp_valid = 1'b1;
              resp_hit   = |hit_vec;
              for (int w = WAYS - 1; w >= 0; w--) begin
                if (hit_vec[w]) resp_way = way_t'(w);
              end
              resp_dirty = rd_row[resp_way].dirty & resp_hit;
            end
            OP_SET_DIRTY: begin
              resp_valid = 1'b1;
              wr_en      = 1'b1;
              wr_row     = rd_row;
              wr_row[way_q].dirty = rd_row[way_q].valid;
            end
            default: ;   // fill / invalidate continue in C_UPDATE
          endcase
        end
      end
      C_UPDATE: begin
        wr_en            = 1'b1;
        wr_row           = upd_row;
        resp_valid       = 1'b1;
        resp_state       = upd_new_state;
        resp_event       = upd_ev;
        resp_upl_update  = upd_upl_update;
        resp_evict_valid = upd_evict_valid;
        resp_evict_dirty = upd_evict_dirty;
        resp_evict_tag   = upd_evict_tag;
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q  <= C_INIT;
      init_q   <= '0;
      op_q     <= OP_LOOKUP;
      idx_q    <= '0;
      tag_q    <= '0;
      way_q    <= '0;
      dirty_q  <= 1'b0;
      status_q <= ST_OK;
      row_q    <= '0;
    end else begin
      unique case (state_q)
        C_INIT: begin
          init_q <= init_q + 1'b1;
          if (init_q == IDX_W'(SETS - 1)) state_q <= C_IDLE;
        end
        C_IDLE: begin
          if (req_valid) begin
            op_q     <= req_op;
            idx_q    <= req_addr[OFF_W +: IDX_W];
            tag_q    <= req_addr[ADDR_W-1 -: TAG_W];
            way_q    <= req_way;
            dirty_q  <= req_dirty;
            status_q <= ST_OK;
            state_q  <= C_CHECK;
          end
        end
        C_REREAD: state_q <= C_CHECK;
        C_CHECK: begin
          if (corr_any) begin
            status_q <= worse(status_q, corr_status);
            state_q  <= (corr_status == ST_UNCORRECTABLE) ? C_IDLE : C_REREAD;
          end else if (op_q == OP_FILL || op_q == OP_INVALIDATE) begin
            row_q   <= rd_row;
            state_q <= C_UPDATE;
          end else begin
            state_q <= C_IDLE;
          end
        end
        C_UPDATE: state_q <= C_IDLE;
        default:  state_q <= C_IDLE;
      endcase
    end
  end

  // A clean row never matches one tag in two ways, and a rebuilt row is clean.
  a_one_hit : assert property (@(posedge clk) disable iff (!rst_n)
    (state_q == C_CHECK && !corr_any) |-> $onehot0(hit_vec));
  a_clean_write : assert property (@(posedge clk) disable iff (!rst_n)
    (state_q == C_UPDATE) |-> (upd_row[0].parity == ^upd_row[0].stored && upd_row[1].parity == ^upd_row[1].stored &&
                               upd_row[2].parity == ^upd_row[2].stored && upd_row[3].parity == ^upd_row[3].stored));
  a_no_resp_idle : assert property (@(posedge clk) disable iff (!rst_n)
    (state_q == C_IDLE || state_q == C_INIT) |-> !resp_valid);

  logic unused;
  assign unused = ^{tag_err, ecc_prot, corr_way, upd_old_state, req_addr[OFF_W-1:0]};

endmodule
