// aes_kat_seq.svh - known-answer sequence shared by the core testbenches.
// Expects an aes_stream_agent instance name in AGENT. Vectors: FIPS-197
// appendices B and C.1, the four ECB-AES128 blocks of NIST SP 800-38A and two
// GFSbox vectors of the AES validation suite (all-zero key).
`define AES_KAT_SEQ(AGENT) \
  AGENT.load_key(128'h2b7e151628aed2a6abf7158809cf4f3c); \
  AGENT.send(128'h3243f6a8885a308d313198a2e0370734, 128'h3925841d02dc09fbdc118597196a0b32, 0); \
  AGENT.send(128'h6bc1bee22e409f96e93d7e117393172a, 128'h3ad77bb40d7a3660a89ecaf32466ef97, 0); \
  AGENT.send(128'hae2d8a571e03ac9c9eb76fac45af8e51, 128'hf5d3d58503b9699de785895a96fdbaaf, 0); \
  AGENT.send(128'h30c81c46a35ce411e5fbc1191a0a52ef, 128'h43b1cd7f598ece23881b00e3ed030688, 0); \
  AGENT.send(128'hf69f2445df4f9b17ad2b417be66c3710, 128'h7b0c785e27e8ad3f8223207104725dd4, 0); \
  AGENT.load_key(128'h000102030405060708090a0b0c0d0e0f); \
  AGENT.send(128'h00112233445566778899aabbccddeeff, 128'h69c4e0d86a7b0430d8cdb78070b4c55a, 1); \
  AGENT.load_key(128'h0); \
  AGENT.send(128'hf34481ec3cc627bacd5dc3fb08f273e6, 128'h0336763e966d92595a567cc9ce537f5e, 1); \
  AGENT.send(128'h9798c4640bad75c7c3227db910174e72, 128'ha9a1631bf4996954ebc093957b234589, 0);
