// tf_pkg: types and constants shared by the CSC Track-Finder modules.
//
// One sector receives 15 CSC track segments per bunch crossing (6 from
// station 1, 3 each from stations 2, 3 and 4) and up to 8 barrel segments.
// Those counts, the 9 assembled tracks (3 streams x 3 key segments), the
// 3 muons per sector, 12 sectors and 4 muons to the Global Trigger follow
// the Track-Finder design. All bit widths and field layouts below are this
// design's own choices.
package tf_pkg;

  // ---- sizes ------------------------------------------------------------
  localparam int N_ME1    = 6;              // station-1 segments per sector
  localparam int N_ME     = 3;              // segments in each of stations 2..4
  localparam int N_LINK   = N_ME1 + 3*N_ME; // 15 optical links
  localparam int N_MB     = 8;              // barrel segments per sector
  localparam int N_SEG    = N_LINK + N_MB;  // 23 angular segments seen by the SP
  localparam int N_STREAM = 3;              // key ME2, key ME3, key ME2 (overlap)
  localparam int N_TRK    = N_STREAM*N_ME;  // 9 track assemblers
  localparam int N_BEST   = 3;              // muons per sector
  localparam int N_SECT   = 12;             // sectors in the system
  localparam int N_GMT    = 4;              // muons to the Global Trigger

  // global segment index of the first segment of each station
  localparam int OFS_ME1 = 0;
  localparam int OFS_ME2 = 6;
  localparam int OFS_ME3 = 9;
  localparam int OFS_ME4 = 12;
  localparam int OFS_MB  = 15;

  // ---- widths -----------------------------------------------------------
  localparam int PHI_W   = 12;
  localparam int ETA_W   = 6;
  localparam int Q_W     = 4;
  localparam int STRIP_W = 8;
  localparam int PAT_W   = 4;
  localparam int WG_W    = 7;
  localparam int PT_AW   = 16;   // Pt assignment memory address
  localparam int PT_DW   = 8;    // {pt[4:0], sign, quality[1:0]}
  localparam int LUT_DW  = 16;   // widest word on the memory access port

  // ---- stations and extrapolation pair types ----------------------------
  typedef enum logic [2:0] {ST_ME1 = 3'd0, ST_ME2 = 3'd1, ST_ME3 = 3'd2,
                            ST_ME4 = 3'd3, ST_MB = 3'd4} station_e;
  localparam int N_STATION = 5;

  typedef enum logic [2:0] {P12 = 3'd0, P13 = 3'd1, P23 = 3'd2, P24 = 3'd3,
                            P34 = 3'd4, PMB2 = 3'd5} pair_e;
  localparam int N_PAIRTYPE = 6;

  // ---- segments -----------------------------------------------------------
  // CSC segment as delivered by an optical link
  typedef struct packed {
    logic               valid;
    logic [Q_W-1:0]     quality;
    logic [PAT_W-1:0]   pattern;   // cathode LCT pattern number
    logic               lr;        // bend sign
    logic [STRIP_W-1:0] strip;     // half-strip number
    logic [WG_W-1:0]    wg;        // anode wire group
  } seg_raw_t;

  // barrel segment from the transition board (phi only)
  typedef struct packed {
    logic             valid;
    logic [Q_W-1:0]   quality;
    logic [PHI_W-1:0] phi;
  } mb_raw_t;

  // segment after the lookup tables
  typedef struct packed {
    logic             valid;
    logic [Q_W-1:0]   quality;
    logic [PHI_W-1:0] phi;
    logic [ETA_W-1:0] eta;
  } seg_ang_t;

  // ---- assembled track ----------------------------------------------------
  // id[s] = 0: no segment in station s, else index+1 within that station
  typedef struct packed {
    logic                         valid;
    logic [3:0]                   rank;   // {number of stations, station-1 present}
    logic [N_STATION-1:0][3:0]    id;
  } track_t;

  // ---- muon out of a sector and out of the sorter -------------------------
  typedef struct packed {
    logic       valid;
    logic [1:0] quality;
    logic [4:0] pt;
    logic       sign;
    logic [5:0] phi;
    logic [5:0] eta;
  } muon_t;

  typedef struct packed {
    muon_t      mu;
    logic [3:0] sector;
  } gmt_cand_t;

  // ---- static settings ----------------------------------------------------
  typedef struct packed {
    logic [N_PAIRTYPE-1:0][PHI_W-1:0] dphi_win;   // per pair type
    logic [N_PAIRTYPE-1:0][ETA_W-1:0] deta_win;
    logic [2:0]                       fs_thresh;  // cancel when common > thresh
    logic [N_SEG-1:0][1:0]            align_dly;  // per input, extra clocks
  } tf_cfg_t;

  // ---- lookup memory access (stands in for the crate's VME access) --------
  typedef enum logic [1:0] {T_PHI = 2'd0, T_ETA = 2'd1, T_PT = 2'd2} lut_tgt_e;

  typedef struct packed {
    logic              en;       // access this cycle (takes the memory port)
    logic              we;       // 1 write, 0 read (data one clock later)
    logic              all_sect; // write to every sector at once
    logic [3:0]        sector;
    lut_tgt_e          tgt;
    logic              all_unit; // every link (T_PHI/T_ETA) or Pt memory (T_PT)
    logic [3:0]        unit;     // link number or Pt memory number
    logic [PT_AW-1:0]  addr;
    logic [LUT_DW-1:0] wdata;
  } lut_req_t;

  // rank used by the muon sorter: valid first, then quality, then pt
  function automatic logic [7:0] mu_rank(muon_t m);
    return {m.valid, m.quality, m.pt};
  endfunction

endpackage
