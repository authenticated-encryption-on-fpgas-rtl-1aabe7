// ae_top: the authenticated-encryption cores of this library side by side.
//
// The cores do not share data paths; each brings its own ports out under a
// prefix:
//   ks_*    aes_gcm_ks       key-synthesized AES-GCM, 128 bits/clock
//   p4_*    aes_gcm_par4_ks  4-parallel key-synthesized AES-GCM, 512 bits/clock
//   koa_*   aes_gcm_koa      key-independent AES-GCM with feedback-free KOA GHASH
//   ag_*    aegis128_fast    AEGIS-128, one state update per clock
//   ccm_*   aes_ccm_lc       compact AES-CCM (static-part bitstream security)
//   gcm_*   aes_gcm_lc       compact AES-GCM (static-part bitstream security)
//   agl_*   aegis128_lc      compact AEGIS-128 (static-part bitstream security)
// The first four target the programmable fabric of an FPGA (high speed);
// the last three are the small cores meant for the fixed configuration
// logic that decrypts and authenticates an incoming bitstream. Their
// `*_tag_ok` outputs are what the configuration controller would use to
// accept or abort a configuration. All share one clock and one active-low
// asynchronous reset. Timing is that of each core.
module ae_top
  import aes_pkg::*;
#(
  parameter block_t KS_KEY   = 128'h000102030405060708090a0b0c0d0e0f,
  parameter int     KOA_NMAX = 64,
  parameter int     CCM_MEM  = 64
) (
  input  logic         clk,
  input  logic         rst_n,
  // key-synthesized AES-GCM
  input  logic         ks_start,
  input  logic [95:0]  ks_iv,
  input  logic [15:0]  ks_n_aad,
  input  logic [15:0]  ks_n_data,
  input  logic         ks_decrypt,
  output logic         ks_busy,
  input  logic         ks_in_valid,
  output logic         ks_in_ready,
  input  block_t       ks_in_block,
  output logic         ks_out_valid,
  output block_t       ks_out_block,
  output logic         ks_tag_valid,
  output block_t       ks_tag,
  // 4-parallel key-synthesized AES-GCM
  input  logic         p4_start,
  input  logic [95:0]  p4_iv,
  input  logic [15:0]  p4_n_aad,
  input  logic [15:0]  p4_n_data,
  input  logic         p4_decrypt,
  output logic         p4_busy,
  input  logic         p4_in_valid,
  output logic         p4_in_ready,
  input  logic [511:0] p4_in_block,
  output logic         p4_out_valid,
  output logic [511:0] p4_out_block,
  output logic         p4_tag_valid,
  output block_t       p4_tag,
  // key-independent AES-GCM with KOA GHASH
  input  logic         koa_key_load,
  input  block_t       koa_key,
  output logic         koa_ready,
  input  logic         koa_start,
  input  logic [95:0]  koa_iv,
  input  logic [15:0]  koa_n_aad,
  input  logic [15:0]  koa_n_data,
  input  logic         koa_decrypt,
  input  logic         koa_in_valid,
  output logic         koa_in_ready,
  input  block_t       koa_in_block,
  output logic         koa_out_valid,
  output block_t       koa_out_block,
  output logic         koa_tag_valid,
  output block_t       koa_tag,
  // AEGIS-128, five AES rounds
  input  logic         ag_start,
  input  block_t       ag_key,
  input  block_t       ag_iv,
  input  logic [15:0]  ag_n_data,
  input  logic         ag_decrypt,
  output logic         ag_busy,
  input  logic         ag_in_valid,
  output logic         ag_in_ready,
  input  block_t       ag_in_block,
  output logic         ag_out_valid,
  output block_t       ag_out_block,
  output logic         ag_tag_valid,
  output block_t       ag_tag,
  // compact AES-CCM
  input  block_t       ccm_key,
  input  logic         ccm_start,
  input  block_t       ccm_ctr0,
  input  logic [15:0]  ccm_n_hdr,
  input  logic [15:0]  ccm_n_data,
  input  logic         ccm_decrypt,
  input  block_t       ccm_tag_in,
  output logic         ccm_busy,
  input  logic         ccm_in_valid,
  output logic         ccm_in_ready,
  input  block_t       ccm_in_block,
  output logic         ccm_out_valid,
  output block_t       ccm_out_block,
  output logic         ccm_tag_valid,
  output block_t       ccm_tag,
  output logic         ccm_tag_ok,
  // compact AES-GCM
  input  block_t       gcm_key,
  input  logic         gcm_start,
  input  logic [95:0]  gcm_iv,
  input  logic [15:0]  gcm_n_aad,
  input  logic [15:0]  gcm_n_data,
  input  logic         gcm_decrypt,
  input  block_t       gcm_tag_in,
  output logic         gcm_busy,
  input  logic         gcm_in_valid,
  output logic         gcm_in_ready,
  input  block_t       gcm_in_block,
  output logic         gcm_out_valid,
  output block_t       gcm_out_block,
  output logic         gcm_tag_valid,
  output block_t       gcm_tag,
  output logic         gcm_tag_ok,
  // compact AEGIS-128
  input  logic         agl_start,
  input  block_t       agl_key,
  input  block_t       agl_iv,
  input  logic [15:0]  agl_n_data,
  input  logic         agl_decrypt,
  input  block_t       agl_tag_in,
  output logic         agl_busy,
  input  logic         agl_in_valid,
  output logic         agl_in_ready,
  input  block_t       agl_in_block,
  output logic         agl_out_valid,
  output block_t       agl_out_block,
  output logic         agl_tag_valid,
  output block_t       agl_tag,
  output logic         agl_tag_ok
);
  aes_gcm_ks #(.KEY(KS_KEY)) u_ks (
    .clk, .rst_n, .start(ks_start), .iv(ks_iv), .n_aad(ks_n_aad), .n_data(ks_n_data),
    .decrypt(ks_decrypt), .busy(ks_busy), .in_valid(ks_in_valid), .in_ready(ks_in_ready),
    .in_block(ks_in_block), .out_valid(ks_out_valid), .out_block(ks_out_block),
    .tag_valid(ks_tag_valid), .tag(ks_tag));

  aes_gcm_par4_ks #(.KEY(KS_KEY)) u_p4 (
    .clk, .rst_n, .start(p4_start), .iv(p4_iv), .n_aad(p4_n_aad), .n_data(p4_n_data),
    .decrypt(p4_decrypt), .busy(p4_busy), .in_valid(p4_in_valid), .in_ready(p4_in_ready),
    .in_block(p4_in_block), .out_valid(p4_out_valid), .out_block(p4_out_block),
    .tag_valid(p4_tag_valid), .tag(p4_tag));

  aes_gcm_koa #(.NMAX(KOA_NMAX)) u_koa (
    .clk, .rst_n, .key_load(koa_key_load), .key(koa_key), .ready(koa_ready),
    .start(koa_start), .iv(koa_iv), .n_aad(koa_n_aad), .n_data(koa_n_data),
    .decrypt(koa_decrypt), .in_valid(koa_in_valid), .in_ready(koa_in_ready),
    .in_block(koa_in_block), .out_valid(koa_out_valid), .out_block(koa_out_block),
    .tag_valid(koa_tag_valid), .tag(koa_tag));

  aegis128_fast u_ag (
    .clk, .rst_n, .start(ag_start), .key(ag_key), .iv(ag_iv), .n_data(ag_n_data),
    .decrypt(ag_decrypt), .busy(ag_busy), .in_valid(ag_in_valid), .in_ready(ag_in_ready),
    .in_block(ag_in_block), .out_valid(ag_out_valid), .out_block(ag_out_block),
    .tag_valid(ag_tag_valid), .tag(ag_tag));

  aes_ccm_lc #(.MEM_DEPTH(CCM_MEM)) u_ccm (
    .clk, .rst_n, .key(ccm_key), .start(ccm_start), .ctr0(ccm_ctr0), .n_hdr(ccm_n_hdr),
    .n_data(ccm_n_data), .decrypt(ccm_decrypt), .tag_in(ccm_tag_in), .busy(ccm_busy),
    .in_valid(ccm_in_valid), .in_ready(ccm_in_ready), .in_block(ccm_in_block),
    .out_valid(ccm_out_valid), .out_block(ccm_out_block), .tag_valid(ccm_tag_valid),
    .tag(ccm_tag), .tag_ok(ccm_tag_ok));

  aes_gcm_lc u_gcm (
    .clk, .rst_n, .key(gcm_key), .start(gcm_start), .iv(gcm_iv), .n_aad(gcm_n_aad),
    .n_data(gcm_n_data), .decrypt(gcm_decrypt), .tag_in(gcm_tag_in), .busy(gcm_busy),
    .in_valid(gcm_in_valid), .in_ready(gcm_in_ready), .in_block(gcm_in_block),
    .out_valid(gcm_out_valid), .out_block(gcm_out_block), .tag_valid(gcm_tag_valid),
    .tag(gcm_tag), .tag_ok(gcm_tag_ok));

  aegis128_lc u_agl (
    .clk, .rst_n, .start(agl_start), .key(agl_key), .iv(agl_iv), .n_data(agl_n_data),
    .decrypt(agl_decrypt), .tag_in(agl_tag_in), .busy(agl_busy), .in_valid(agl_in_valid),
    .in_ready(agl_in_ready), .in_block(agl_in_block), .out_valid(agl_out_valid),
    .out_block(agl_out_block), .tag_valid(agl_tag_valid), .tag(agl_tag),
    .tag_ok(agl_tag_ok));
endmodule
