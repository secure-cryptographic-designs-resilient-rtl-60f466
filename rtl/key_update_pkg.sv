// key_update_pkg: constants shared by the key update scheme's blocks and by
// a TPM model used in simulation.
//
// The FPGA fabric talks to the TPM over SPI with short frames of this
// design's own: a command byte, the key slot number (one byte, or two for
// lists of more than 256 keys) and, for a read, 16 data bytes clocked out by the TPM (key byte 0 first). The document says only
// that instructions and key exchange run over SPI; a real TPM 2.0 needs its
// command set (e.g. GetRandom and NV storage commands inside TCG SPI register
// frames) behind this same client interface.
package key_update_pkg;

  localparam logic [7:0] TPM_CMD_GEN  = 8'hA0;  // generate a random key into slot
  localparam logic [7:0] TPM_CMD_READ = 8'h80;  // read back the key in slot
  localparam int unsigned KEY_BYTES   = 16;     // AES-128 key

  typedef enum logic [0:0] {TPM_GEN = 1'b0, TPM_READ = 1'b1} tpm_op_e;

endpackage
