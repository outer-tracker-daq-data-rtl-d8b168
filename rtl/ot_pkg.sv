// ot_pkg: sizes, constants and record types shared by the Outer Tracker
// TELL1 output formatter.
//
// The formatter turns one trigger's worth of front-end data (24 optical GOL
// links, 4 OTIS chips per link, 32 straw channels per OTIS) into LHCb data
// banks and packs those into Multiple Event Packets (MEPs).  Word layouts
// follow the published OT DAQ format: the leftmost field of a header word is
// its most significant part.  Everything the format leaves to other
// documents (the layout of the 32-bit OTIS header, how a channel byte is
// flagged as a hit, the receiver status flags) enters here as an explicit
// record field and is documented where it is declared.
package ot_pkg;

  // ---------------------------------------------------------------- sizes
  localparam int unsigned N_PP          = 4;   // PP FPGAs on a TELL1
  localparam int unsigned LINKS_PER_PP  = 6;   // optical links per PP FPGA
  localparam int unsigned N_LINKS       = N_PP * LINKS_PER_PP;  // 24 GOLs
  localparam int unsigned OTIS_PER_LINK = 4;
  localparam int unsigned CH_PER_OTIS   = 32;
  localparam int unsigned CH_PER_LINK   = OTIS_PER_LINK * CH_PER_OTIS; // 128
  localparam int unsigned OTIS_BYTES    = 36;  // 4 header + 32 data bytes

  // RAW bank: per PP FPGA 108 "even" words, 108 "odd" words, 17 info words.
  localparam int unsigned RAW_HALF_WORDS = 108;
  localparam int unsigned EVINFO_WORDS   = 17;
  localparam int unsigned RAW_PP_WORDS   = 2 * RAW_HALF_WORDS + EVINFO_WORDS; // 233
  localparam logic [15:0] RAW_PP_BYTES   = 16'h03A4;  // 932 = 233 * 4

  // Error bank constant fields.
  localparam logic [15:0] INFO_LEN_BYTES = 16'h0038;  // W4..W17 = 14 words
  localparam logic [15:0] E2_CONST       = 16'h8E00;
  localparam logic [15:0] E3_CONST       = 16'h8E01;
  localparam logic [31:0] E4_CONST       = 32'h0000_8E02;
  localparam logic [15:0] E5_CONST       = 16'h8E03;

  // Bank header and MEP defaults.
  localparam logic [15:0] BANK_MAGIC          = 16'hCBCB;
  localparam logic [7:0]  TYPE_PROCESSED      = 8'h0C;
  localparam logic [7:0]  TYPE_RAW            = 8'h20;
  localparam logic [7:0]  TYPE_ERROR          = 8'h21;
  localparam logic [31:0] PARTITION_ID_DEFAULT = 32'hEDED_1D1D;
  localparam logic [3:0]  DETECTOR_ID_OT      = 4'h3;
  localparam logic [2:0]  TRIG_TYPE_RAW       = 3'h5;  // trigger type forcing a RAW bank

  // ------------------------------------------------------------ records
  // 32-bit OTIS header as delivered on the link.  Only bit 19 (always '1')
  // and the three status flags are fixed by the OT format; the placement of
  // the other fields is this design's choice.
  typedef struct packed {
    logic [9:0] reserved;   // [31:22]
    logic [1:0] otis_id;    // [21:20] position of the OTIS on its GOL (0..3)
    logic       one;        // [19]    must read '1'
    logic [2:0] status;     // [18:16] SEU, buffer overflow, truncation
    logic [7:0] evcnt;      // [15:8]  OTIS event counter (low 8 bits)
    logic [7:0] bx;         // [7:0]   OTIS bunch counter
  } otis_hdr_t;

  // One OTIS event fragment: its header, its 32 channel bytes (encoded drift
  // times) and the receiver's per-channel hit flags.  Byte n of the 36-byte
  // RAW-bank fragment is hdr[8n+7:8n] for n<4 and data[n-4] otherwise.
  typedef struct packed {
    logic [CH_PER_OTIS-1:0]      hit;
    logic [CH_PER_OTIS-1:0][7:0] data;
    otis_hdr_t                   hdr;
  } otis_frag_t;

  typedef otis_frag_t [OTIS_PER_LINK-1:0] link_frag_t;

  // Per-link status reported by the optical receiver for this event.
  typedef struct packed {
    logic       buf_full;      // rx buffer full for this event
    logic       buf_empty;     // rx buffer empty for this event
    logic       size_err;      // event size error
    logic       tlk_err;       // TLK transmission error
    logic       golid_ne;      // GOL ID not equal
    logic       clk_inactive;  // optical link clock not active
    logic [3:0] exp_id_wrong;  // per OTIS: expected OTIS ID wrong
    logic [3:0] offline;       // per OTIS: OTIS offline
    logic [3:0] offline_zero;  // per OTIS: no ID different from 0x000 found
  } link_status_t;

  // Trigger and timing information for one event.
  typedef struct packed {
    logic [31:0] l0_evid;   // L0 event counter
    logic [11:0] bx;        // bunch counter
    logic [2:0]  trig_type;
    logic        ecs_trig;  // trigger not generated by TTC
  } ttc_t;

  // Static configuration (the TELL1 configuration file).
  typedef struct packed {
    logic [N_LINKS-1:0]       link_en;    // GOL enabled
    logic [N_LINKS-1:0]       zs_mode;    // 1: zero-suppress, 0: hitmap
    logic [N_LINKS-1:0][9:0]  gol_id;     // station/layer/quarter/module
    logic [N_PP-1:0]          pp_en;      // PP FPGA enabled
    logic                     force_raw;  // force_raw_bank
    logic                     force_info; // force_info_bank
    logic                     datagen_en; // internal data generator enabled
    logic [15:0]              source_id;
    logic [7:0]               version;
    logic [7:0]               type_proc;
    logic [7:0]               type_raw;
    logic [7:0]               type_err;
    logic [5:0]               mep_factor; // events per MEP, 1..32
    logic [31:0]              partition_id;
  } cfg_t;

  // ---------------------------------------------------------- functions
  function automatic logic [5:0] popcount32(input logic [31:0] v);
    logic [5:0] n;
    n = '0;
    for (int i = 0; i < 32; i++) n += 6'(v[i]);
    return n;
  endfunction

  // Bank header, first word: length in bytes and the magic pattern.
  function automatic logic [31:0] bank_hdr0(input logic [15:0] len);
    return {len, BANK_MAGIC};
  endfunction

  // Bank header, second word: source ID, version, type.
  function automatic logic [31:0] bank_hdr1(input logic [15:0] src,
                                            input logic [7:0] ver,
                                            input logic [7:0] typ);
    return {src, ver, typ};
  endfunction

  // OT specific header (also W3 of the event information section).
  function automatic logic [31:0] ot_spec_hdr(input logic [2:0] trig,
                                              input logic err,
                                              input logic [7:0] bx,
                                              input logic [15:0] ngol);
    return {4'h0, trig, err, bx, ngol};
  endfunction

endpackage
