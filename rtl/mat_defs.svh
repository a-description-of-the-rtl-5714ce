// Helper macros of the top level: test for a decoded microoperation and fetch
// the source selection and immediate data that belong to a load
// microoperation (S1/F2 when it is coded in F1, S3/F4 when coded in F3).
`ifndef MAT_DEFS_SVH
`define MAT_DEFS_SVH
`define MOP(M) act[mat_mop_pkg::MOP_``M]
`define SEL(M) ((mat_mop_pkg::mop_field(mat_mop_pkg::MOP_``M) == 1) ? u.s1 : u.s3)
`define DAT(M) ((mat_mop_pkg::mop_field(mat_mop_pkg::MOP_``M) == 1) ? u.f2 : u.f4)
`endif
