// pc_pkg: types, constants and width functions shared by the packet
// classifier. The 5-tuple field widths (SA/DA 32 bit, SP/DP 16 bit,
// PRT 8 bit), the super-variable size k = 2 and the rule-number width
// (9816 rules -> 14 bits) follow the classifier this RTL implements. The
// write-bubble and host-command formats are this design's own choice.
//
// Cascade geometry: a field of n bits is cut into u = ceil(n/k) super
// variables, most significant first. Stage j (0 = top, LUT_u in the usual
// numbering) reads its k input bits and the rails of stage j-1, and writes
// rails for stage j+1 plus an Arail weight of IDX_W bits. The number of
// rails leaving stage j is min(RAIL_W, k*(j+1)) because at most 2^(k*(j+1))
// nodes can exist at that level; the last stage emits no rails (its only
// successor is the zero terminal).
package pc_pkg;

  localparam int unsigned SA_W   = 32;
  localparam int unsigned DA_W   = 32;
  localparam int unsigned SP_W   = 16;
  localparam int unsigned DP_W   = 16;
  localparam int unsigned PRT_W  = 8;
  localparam int unsigned K_DEF  = 2;
  localparam int unsigned RULE_W = 14;

  // write-bubble field widths
  localparam int unsigned WB_STAGE_W = 5;
  localparam int unsigned WB_ADDR_W  = 20;
  localparam int unsigned WB_DATA_W  = 32;

  typedef struct packed {
    logic [SA_W-1:0]  sa;
    logic [DA_W-1:0]  da;
    logic [SP_W-1:0]  sp;
    logic [DP_W-1:0]  dp;
    logic [PRT_W-1:0] prt;
  } header_t;

  // which memory of a rule group a write bubble is aimed at
  typedef enum logic [2:0] {
    TGT_SA    = 3'd0,
    TGT_DA    = 3'd1,
    TGT_SP    = 3'd2,
    TGT_DP    = 3'd3,
    TGT_PRT   = 3'd4,
    TGT_CP    = 3'd5,
    TGT_TRANS = 3'd6
  } wb_target_e;

  // one memory word write travelling down the pipeline with the packets
  typedef struct packed {
    logic                  valid;
    logic                  grp;     // rule group 0 or 1
    wb_target_e            tgt;
    logic [WB_STAGE_W-1:0] stage;   // cascade stage, 0 = top
    logic [WB_ADDR_W-1:0]  addr;    // {rails in, super variable}
    logic [WB_DATA_W-1:0]  data;    // {rails out, weight}, weight in LSBs
  } wr_bubble_t;

  // the single rule held by the range-matching CAM
  typedef struct packed {
    logic [SA_W-1:0]   sa_lo;
    logic [SA_W-1:0]   sa_hi;
    logic [DA_W-1:0]   da_lo;
    logic [DA_W-1:0]   da_hi;
    logic [SP_W-1:0]   sp_lo;
    logic [SP_W-1:0]   sp_hi;
    logic [DP_W-1:0]   dp_lo;
    logic [DP_W-1:0]   dp_hi;
    logic [PRT_W-1:0]  prt;
    logic [RULE_W-1:0] rule;
  } cam_rule_t;

  typedef enum logic [1:0] {
    CMD_CAM_SET   = 2'd0,   // load the update rule into the CAM
    CMD_LUT_WRITE = 2'd1,   // write one word of a cascade / translation memory
    CMD_CAM_CLEAR = 2'd2    // update finished: drain, clear CAM, report done
  } cmd_op_e;

  typedef struct packed {
    cmd_op_e               op;
    logic                  grp;
    wb_target_e            tgt;
    logic [WB_STAGE_W-1:0] stage;
    logic [WB_ADDR_W-1:0]  addr;
    logic [WB_DATA_W-1:0]  data;
    cam_rule_t             rule;
  } cmd_t;

  function automatic int unsigned n_stages(int unsigned n, int unsigned k);
    return (n + k - 1) / k;
  endfunction

  function automatic int unsigned rail_out_w(int unsigned j, int unsigned u,
                                             int unsigned k, int unsigned rail_w);
    if (j + 1 >= u) return 0;
    return (k * (j + 1) < rail_w) ? k * (j + 1) : rail_w;
  endfunction

  function automatic int unsigned rail_in_w(int unsigned j, int unsigned u,
                                            int unsigned k, int unsigned rail_w);
    if (j == 0) return 0;
    return rail_out_w(j - 1, u, k, rail_w);
  endfunction

  // cycles from a key entering a cascade to its index leaving it
  function automatic int unsigned cascade_latency(int unsigned n, int unsigned k);
    return n_stages(n, k) + 1;
  endfunction

  function automatic int unsigned max2(int unsigned a, int unsigned b);
    return (a > b) ? a : b;
  endfunction

  // cycles from a header entering a rule group to its rule number leaving it
  function automatic int unsigned group_latency(int unsigned k, int unsigned cp_in);
    int unsigned lf;
    lf = max2(max2(cascade_latency(SA_W, k), cascade_latency(DA_W, k)),
              max2(max2(cascade_latency(SP_W, k), cascade_latency(DP_W, k)),
                   cascade_latency(PRT_W, k)));
    return lf + cascade_latency(cp_in, k) + 1;
  endfunction

endpackage
