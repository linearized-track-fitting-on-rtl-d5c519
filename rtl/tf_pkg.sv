// tf_pkg: types and constants shared by the linearized track fitter.
//
// The fitter works on roads: up to MAX_CLUS clusters in each of NLAYERS
// detector layers plus the road, event and sector identifiers. A track is one
// cluster per layer, i.e. a hit vector x of NLAYERS coordinates. The helix
// parameters are p_i = C_i.x + q_i (NPAR of them) and the goodness is
// chi2 = sum_j (S_j.x + h_j)^2 over NDOF rows.
//
// Eight layers, three clusters per layer, four channels, five helix
// parameters and 16-bit outputs follow the fitter's specification. All other
// widths are this design's choice. Arithmetic is fixed point rather than
// single-precision float: hits are signed integers in detector units,
// slopes C and S carry COEF_FRAC fraction bits, offsets q and h carry
// COEF_FRAC fraction bits in a wider word, and results are rounded to signed
// 16-bit numbers with OUT_FRAC fraction bits.
package tf_pkg;

  localparam int NLAYERS    = 8;   // layers used by the fit
  localparam int MAX_CLUS   = 3;   // clusters per layer kept in a road
  localparam int NPAR       = 5;   // helix parameters
  localparam int NDOF       = 3;   // chi2 rows: coordinates minus parameters
  localparam int HIT_W      = 16;
  localparam int COEF_W     = 16;
  localparam int OFFS_W     = 32;
  localparam int COEF_FRAC  = 8;
  localparam int OUT_W      = 16;
  localparam int OUT_FRAC   = 8;
  localparam int ROAD_W     = 16;
  localparam int EVENT_W    = 16;
  localparam int SECTOR_W   = 16;
  localparam int NCLUS_W    = $clog2(MAX_CLUS + 1);

  typedef logic signed [HIT_W-1:0]  hit_t;
  typedef logic signed [COEF_W-1:0] coef_t;
  typedef logic signed [OFFS_W-1:0] offs_t;
  typedef logic signed [OUT_W-1:0]  fix16_t;
  typedef logic [ROAD_W-1:0]        road_id_t;
  typedef logic [EVENT_W-1:0]       event_id_t;
  typedef logic [SECTOR_W-1:0]      sector_id_t;

  typedef struct packed {
    road_id_t   road;
    event_id_t  event_id;
    sector_id_t sector;
  } ids_t;

  // Road package as delivered by the data organizer.
  typedef struct packed {
    ids_t                                   ids;
    logic [NLAYERS-1:0][NCLUS_W-1:0]        nclus;
    hit_t [NLAYERS-1:0][MAX_CLUS-1:0]       clus;
  } road_t;

  // One track candidate; first/last mark the boundaries of its road.
  typedef struct packed {
    ids_t               ids;
    logic               first;
    logic               last;
    hit_t [NLAYERS-1:0] x;
  } track_t;

  // A track that passed the chi2 cut, with its goodness.
  typedef struct packed {
    track_t trk;
    fix16_t chi2;
  } good_track_t;

  // Tag that ties a constant set to the road and sector it was fetched for.
  typedef struct packed {
    road_id_t   road;
    sector_id_t sector;
  } ctag_t;

  typedef struct packed {
    coef_t [NDOF-1:0][NLAYERS-1:0] s;
    offs_t [NDOF-1:0]              h;
  } chi2_const_t;

  typedef struct packed {
    coef_t [NPAR-1:0][NLAYERS-1:0] c;
    offs_t [NPAR-1:0]              q;
  } par_const_t;

  localparam int HBM_DATA_W = $bits(par_const_t);

  // Destination of a constant request: channels 0..3 get chi2 constants,
  // DEST_PAR gets parameter constants.
  localparam int DEST_W   = 3;
  localparam logic [DEST_W-1:0] DEST_PAR = 3'd4;

  typedef struct packed {
    logic [DEST_W-1:0] dest;
    ctag_t             tag;
  } hbm_req_t;

  typedef struct packed {
    logic [DEST_W-1:0]     dest;
    ctag_t                 tag;
    logic [HBM_DATA_W-1:0] data;
  } hbm_rsp_t;

  typedef struct packed {
    ids_t                ids;
    fix16_t              chi2;
    fix16_t [NPAR-1:0]   p;
  } fit_result_t;

  // Round a value with COEF_FRAC fraction bits to OUT_FRAC fraction bits and
  // saturate it to a signed OUT_W-bit word.
  function automatic fix16_t sat16(input logic signed [79:0] v);
    logic signed [79:0] r;
    r = v >>> (COEF_FRAC - OUT_FRAC);
    if (r > 80'sd32767)       return 16'sh7fff;
    else if (r < -80'sd32768) return 16'sh8000;
    else                      return fix16_t'(r[15:0]);
  endfunction

endpackage
